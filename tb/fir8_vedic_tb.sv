// End-to-end self-checking testbench for the 8-tap FIR filter fir8_vedic,
// run with every parameter at its default (8 taps, 8-bit samples and
// coefficients, 16-bit output).
//
// A reference model keeps its own copy of the last seven samples and computes
//     fout = sum_k h[k] * x(n-k)  mod 2^16
// with the simulator's arithmetic.  Inputs change just after a falling edge;
// fout is compared in the same cycle, before the next rising edge shifts the
// delay line.  Phases:
//   1. reset clears the delay line: with fin = 0 the output must be 0 even
//      with all coefficients at 255;
//   2. impulse response: a single 1 on fin must bring out h0, h1, ... h7 on
//      exactly the 0th, 1st, ... 7th cycle after it (the latency check);
//   3. the stimulus of the published waveform: fin = 3..7 while every
//      coefficient steps up by one per cycle;
//   4. random samples with coefficients changing every cycle, including
//      large values so that the 16-bit output wraps;
//   5. a reset in the middle of a stream, then more random samples.
// Each mechanism (reset, delay-line latency, coefficient change, output wrap)
// is counted, and one that never happened counts as a failure.
module fir8_vedic_tb;

  localparam int unsigned TAPS = fir_pkg::TAPS;

  logic        clk;
  logic        rst;
  logic [7:0]  fin;
  logic [7:0]  h [TAPS];
  logic [15:0] fout;

  int checks = 0;
  int failures = 0;
  int n_resets = 0, n_latency = 0, n_coef_changes = 0, n_wraps = 0;

  // Reference delay line: model_x[k] = x(n-k) for k >= 1.
  int unsigned model_x [TAPS];
  logic [7:0]  prev_h  [TAPS];

  fir8_vedic u_dut (.clk(clk), .rst(rst), .fin(fin), .h(h), .fout(fout));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned model_sum();
    int unsigned s = 0;
    s = int'(fin) * int'(h[0]);
    for (int k = 1; k < TAPS; k++) s += model_x[k] * int'(h[k]);
    return s;
  endfunction

  // Drive one cycle's inputs, compare fout, then let the rising edge shift
  // both the design and the model.
  task automatic step(input logic rst_v, input logic [7:0] fin_v,
                      input logic [7:0] h_v [TAPS]);
    int unsigned full;
    @(negedge clk);
    rst = rst_v;
    fin = fin_v;
    for (int k = 0; k < TAPS; k++) begin
      if (h_v[k] != prev_h[k]) n_coef_changes++;
      h[k] = h_v[k];
      prev_h[k] = h_v[k];
    end
    #1;
    full = model_sum();
    if (full > 32'hFFFF) n_wraps++;
    checks++;
    if (fout !== 16'(full)) begin
      failures++;
      $display("FAIL t=%0t fin=%0d: fout=%0d expected %0d", $time, fin, fout,
               16'(full));
    end
    @(posedge clk);
    if (rst_v) begin
      for (int k = 1; k < TAPS; k++) model_x[k] = 0;
      n_resets++;
    end else begin
      for (int k = TAPS - 1; k > 1; k--) model_x[k] = model_x[k-1];
      model_x[1] = 32'(fin_v);
    end
  endtask

  initial begin
    logic [7:0] hv [TAPS];
    logic [7:0] himp [TAPS];

    rst = 1'b1;
    fin = '0;
    for (int k = 0; k < TAPS; k++) begin
      h[k] = '0;
      prev_h[k] = '0;
      model_x[k] = 0;
    end

    // 1. Reset, then all-ones coefficients against a zero input.
    for (int k = 0; k < TAPS; k++) hv[k] = 8'($urandom);
    step(1'b1, 8'($urandom), hv);
    step(1'b1, 8'($urandom), hv);
    for (int k = 0; k < TAPS; k++) hv[k] = 8'hFF;
    step(1'b0, 8'd0, hv);
    checks++;
    if (fout !== 16'd0) begin
      failures++;
      $display("FAIL delay line not cleared by reset: fout=%0d", fout);
    end

    // 2. Impulse response with distinct coefficients.
    for (int k = 0; k < TAPS; k++) himp[k] = 8'(11 * k + 3);
    for (int k = 0; k < TAPS; k++) step(1'b0, 8'd0, himp);
    for (int c = 0; c < TAPS; c++) step(1'b0, (c == 0) ? 8'd1 : 8'd0, himp);
    // The same impulse again, now checking fout against h[c] directly on
    // each cycle c after it (the cycle count of the delay line).
    for (int k = 0; k < TAPS; k++) step(1'b0, 8'd0, himp);
    for (int c = 0; c < TAPS; c++) begin
      @(negedge clk);
      rst = 1'b0;
      fin = (c == 0) ? 8'd1 : 8'd0;
      #1;
      checks++;
      if (fout !== 16'(himp[c])) begin
        failures++;
        $display("FAIL impulse: cycle %0d after impulse fout=%0d, expected h%0d=%0d",
                 c, fout, c, himp[c]);
      end else begin
        n_latency++;
      end
      @(posedge clk);
      for (int k = TAPS - 1; k > 1; k--) model_x[k] = model_x[k-1];
      model_x[1] = 32'(fin);
    end

    // 3. Stimulus of the published waveform: fin = 3..7, and each
    //    coefficient rising by one per cycle from (6,5,7,3,4,5,6,8).
    for (int i = 0; i < 5; i++) begin
      hv[0] = 8'(6 + i); hv[1] = 8'(5 + i); hv[2] = 8'(7 + i); hv[3] = 8'(3 + i);
      hv[4] = 8'(4 + i); hv[5] = 8'(5 + i); hv[6] = 8'(6 + i); hv[7] = 8'(8 + i);
      step(1'b0, 8'(3 + i), hv);
    end

    // 4. Random stream with coefficients changing every cycle; the upper
    //    half of the run uses large values so that the output wraps.
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < TAPS; k++)
        hv[k] = (i >= 1000) ? 8'(8'd192 | 8'($urandom)) : 8'($urandom);
      step(1'b0, (i >= 1000) ? 8'(8'd192 | 8'($urandom)) : 8'($urandom), hv);
    end

    // 5. Reset in the middle of a stream, then more random samples.
    step(1'b1, 8'($urandom), hv);
    for (int i = 0; i < 200; i++) begin
      for (int k = 0; k < TAPS; k++) hv[k] = 8'($urandom);
      step(1'b0, 8'($urandom), hv);
    end

    if (n_resets == 0)       begin failures++; $display("FAIL no reset happened"); end
    if (n_latency != TAPS)   begin failures++; $display("FAIL impulse latency seen on %0d taps", n_latency); end
    if (n_coef_changes == 0) begin failures++; $display("FAIL coefficients never changed"); end
    if (n_wraps == 0)        begin failures++; $display("FAIL output never wrapped"); end
    $display("mechanisms: resets=%0d impulse_taps=%0d coef_changes=%0d wraps=%0d",
             n_resets, n_latency, n_coef_changes, n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
