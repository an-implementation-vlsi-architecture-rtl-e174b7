// Eight-tap programmable FIR filter built from Vedic multipliers and a
// Kogge-Stone adder tree.
//
// It computes, every clock cycle,
//     fout(n) = sum_{k=0}^{TAPS-1} h[k] * x(n-k)   (mod 2^(2*DATA_W))
// where x(n) is the sample on fin in the current cycle and x(n-1) ...
// x(n-TAPS+1) are the previous samples held in a TAPS-1 stage shift register.
//
// How it works: the delay line is the only state.  Each tap's sample is
// multiplied by its coefficient in a DATA_W x DATA_W Vedic multiplier
// (vedic_mult), and the TAPS products are summed by a balanced binary tree of
// 2*DATA_W-bit Kogge-Stone adders (ks_adder), 7 adders in 3 levels for 8 taps.
// Each adder's carry out is dropped, so fout is the sum modulo 2^16 at the
// default sizes: fout is as wide as one product.
//
// Interface:
//   clk      rising-edge clock of the delay line
//   rst      synchronous, active-high: clears the delay line to zero
//   fin      input sample x(n), unsigned DATA_W bits
//   h[k]     coefficient of tap k (h0..h7), unsigned DATA_W bits; it is a
//            live input and may change every cycle
//   fout     filter output, unsigned 2*DATA_W bits
// Timing: fout is combinational from fin, h and the delay line, so a sample
// contributes h[0]*x(n) in the cycle it is presented and h[k]*x(n) k rising
// edges later.  An impulse on fin therefore reproduces h[0], h[1], ... h[7]
// on fout on consecutive cycles.
//
// The tap count, the 8-bit sample and coefficient widths, the 16-bit output,
// the coefficient inputs, and the use of Vedic multipliers and Kogge-Stone
// adders follow the published design, as does the placement of the registers
// (on the input side only, with a combinational path to fout).  The reset,
// the direct-form arrangement, the balanced adder tree and the modulo-2^16
// wrap of the sum are this design's choices.  TAPS must be at least 2.
module fir8_vedic #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [DATA_W-1:0]     fin,
  input  logic [DATA_W-1:0]     h [TAPS],
  output logic [2*DATA_W-1:0]   fout
);

  localparam int unsigned PROD_W = 2 * DATA_W;
  // Leaves of the adder tree, rounded up to a power of two.
  localparam int unsigned NLEAF  = 1 << $clog2(TAPS);

  if (TAPS < 2) begin : g_bad_taps
    $error("fir8_vedic: TAPS must be at least 2");
  end

  // Tap samples: x_tap[0] is the current input, x_tap[k] is x(n-k).
  logic [DATA_W-1:0] x_tap  [TAPS];
  logic [TAPS-1:1][DATA_W-1:0] x_hist;   // shift register, x(n-1) .. x(n-TAPS+1)
  logic [PROD_W-1:0] prod   [TAPS];

  // Delay line (the filter's only registers).
  always_ff @(posedge clk) begin
    if (rst) begin
      x_hist <= '0;
    end else begin
      x_hist[1] <= fin;
      for (int k = 2; k < TAPS; k++) x_hist[k] <= x_hist[k-1];
    end
  end

  assign x_tap[0] = fin;
  for (genvar k = 1; k < TAPS; k++) begin : g_tap
    assign x_tap[k] = x_hist[k];
  end

  // One Vedic multiplier per tap.
  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    vedic_mult #(.WIDTH(DATA_W)) u_mul (
      .a(x_tap[k]), .b(h[k]), .p(prod[k])
    );
  end

  // Adder tree stored as a heap: node i has children 2i+1 and 2i+2; the
  // leaves NLEAF-1 .. 2*NLEAF-2 carry the products (zero past TAPS).
  for (genvar i = 0; i < 2 * NLEAF - 1; i++) begin : g_node
    logic [PROD_W-1:0] val;
    if (i >= NLEAF - 1) begin : g_leaf
      if (i - (NLEAF - 1) < TAPS) begin : g_prod
        assign val = prod[i - (NLEAF - 1)];
      end else begin : g_pad
        assign val = '0;
      end
    end else begin : g_add
      logic [PROD_W:0] s;
      ks_adder #(.WIDTH(PROD_W)) u_add (
        .a(g_node[2*i+1].val), .b(g_node[2*i+2].val), .sum(s)
      );
      // The carry out is dropped: the output wraps modulo 2^PROD_W.
      assign val = s[PROD_W-1:0];
    end
  end

  assign fout = g_node[0].val;

endmodule
