// Self-checking testbench for ks_adder.
//
// Checks an 8-bit and a 16-bit adder (the two sizes of the published design)
// plus a 5-bit one (a width that is not a power of two):
//   - the stimulus of the published 8-bit waveform, k1 = 0..6 with
//     k2 = k1 + 4, whose sums are 4, 6, ..., 16;
//   - the stimulus of the published 16-bit waveform, p1 = 0..6 with
//     p2 = p1 + 3, whose sums are 3, 5, ..., 15;
//   - corner cases (all ones, carry chains the full width);
//   - exhaustive 5-bit and 8-bit operand pairs and random 16-bit pairs.
// The reference is the simulator's own + on wider integers.
module ks_adder_tb;

  logic [7:0]  a8,  b8;
  logic [8:0]  s8;
  logic [15:0] a16, b16;
  logic [16:0] s16;
  logic [4:0]  a5,  b5;
  logic [5:0]  s5;

  int checks = 0;
  int failures = 0;

  ks_adder #(.WIDTH(8))  u_add8  (.a(a8),  .b(b8),  .sum(s8));
  ks_adder #(.WIDTH(16)) u_add16 (.a(a16), .b(b16), .sum(s16));
  ks_adder #(.WIDTH(5))  u_add5  (.a(a5),  .b(b5),  .sum(s5));

  task automatic check8(input logic [7:0] x, input logic [7:0] y);
    a8 = x; b8 = y;
    #1;
    checks++;
    if (s8 !== 9'(x) + 9'(y)) begin
      failures++;
      $display("FAIL 8-bit: %0d + %0d gave %0d", x, y, s8);
    end
  endtask

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if (s16 !== 17'(x) + 17'(y)) begin
      failures++;
      $display("FAIL 16-bit: %0d + %0d gave %0d", x, y, s16);
    end
  endtask

  task automatic check5(input logic [4:0] x, input logic [4:0] y);
    a5 = x; b5 = y;
    #1;
    checks++;
    if (s5 !== 6'(x) + 6'(y)) begin
      failures++;
      $display("FAIL 5-bit: %0d + %0d gave %0d", x, y, s5);
    end
  endtask

  // Watchdog.
  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published 8-bit waveform: k1 = 0..6, k2 = 4..10.
    for (int i = 0; i <= 6; i++) begin
      check8(8'(i), 8'(i + 4));
      checks++;
      if (s8 != 9'(2 * i + 4)) begin
        failures++;
        $display("FAIL 8-bit waveform step %0d: %0d", i, s8);
      end
    end
    // Published 16-bit waveform: p1 = 0..6, p2 = 3..9.
    for (int i = 0; i <= 6; i++) begin
      check16(16'(i), 16'(i + 3));
      checks++;
      if (s16 != 17'(2 * i + 3)) begin
        failures++;
        $display("FAIL 16-bit waveform step %0d: %0d", i, s16);
      end
    end
    // Corners.
    check8(8'hFF, 8'hFF);  check8(8'hFF, 8'h01);  check8(8'h80, 8'h80);
    check16(16'hFFFF, 16'hFFFF); check16(16'hFFFF, 16'h0001);
    check16(16'h7FFF, 16'h0001); check16(16'h5555, 16'hAAAA);
    // Exhaustive small widths.
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) check5(5'(x), 5'(y));
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) check8(8'(x), 8'(y));
    // Random 16-bit.
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
