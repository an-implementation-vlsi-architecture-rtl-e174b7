// Self-checking testbench for vedic_mult_2x2: all 16 operand pairs against
// the simulator's own multiply.
module vedic_mult_2x2_tb;

  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0;
  int failures = 0;

  vedic_mult_2x2 u_dut (.a(a), .b(b), .p(p));

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++) begin
        a = 2'(x); b = 2'(y);
        #1;
        checks++;
        if (p !== 4'(x * y)) begin
          failures++;
          $display("FAIL %0d * %0d gave %0d", x, y, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
