// Self-checking testbench for vedic_mult at the three sizes the published
// design reports (8, 16 and 32 bits) and at 4 bits.
//
// 4-bit and 8-bit multipliers are checked exhaustively, the 16- and 32-bit
// ones on corner cases (zero, one, all ones, single bits) and random pairs.
// The reference is the simulator's own * on 64-bit integers.
module vedic_mult_tb;

  logic [3:0]  a4;  logic [3:0]  b4;  logic [7:0]  p4;
  logic [7:0]  a8;  logic [7:0]  b8;  logic [15:0] p8;
  logic [15:0] a16; logic [15:0] b16; logic [31:0] p16;
  logic [31:0] a32; logic [31:0] b32; logic [63:0] p32;

  int checks = 0;
  int failures = 0;

  vedic_mult #(.WIDTH(4))  u_m4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mult               u_m8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult #(.WIDTH(16)) u_m16 (.a(a16), .b(b16), .p(p16));
  vedic_mult #(.WIDTH(32)) u_m32 (.a(a32), .b(b32), .p(p32));

  task automatic check(input int w, input longint unsigned x,
                       input longint unsigned y);
    longint unsigned got, want;
    case (w)
      4:  begin a4  = 4'(x);  b4  = 4'(y);  end
      8:  begin a8  = 8'(x);  b8  = 8'(y);  end
      16: begin a16 = 16'(x); b16 = 16'(y); end
      default: begin a32 = 32'(x); b32 = 32'(y); end
    endcase
    #1;
    case (w)
      4:  got = 64'(p4);
      8:  got = 64'(p8);
      16: got = 64'(p16);
      default: got = p32;
    endcase
    want = x * y;
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL %0d-bit: %0d * %0d gave %0d, expected %0d",
                 w, x, y, got, want);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned m16, m32;
    m16 = 64'hFFFF;
    m32 = 64'hFFFF_FFFF;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) check(4, x, y);
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) check(8, x, y);
    // Corners and single-bit operands.
    check(16, m16, m16); check(16, 0, m16); check(16, 1, m16);
    check(32, m32, m32); check(32, 0, m32); check(32, 1, m32);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) check(16, 64'(1) << i, (64'(1) << j) | 64'(1));
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) check(32, 64'(1) << i, m32 >> j);
    for (int i = 0; i < 20000; i++) begin
      check(16, longint'($urandom) & m16, longint'($urandom) & m16);
      check(32, longint'($urandom), longint'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
