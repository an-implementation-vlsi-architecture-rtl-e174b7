// 32x32-bit unsigned Vedic multiplier (Urdhva Tiryagbhyam sutra).
//
// The operands are split into high and low halves of 16 bits; four
// vedic_mult_16x16 blocks form the vertical (aL*bL, aH*bH) and crosswise
// (aH*bL, aL*bH) products in parallel, and vedic_combine adds them with
// Kogge-Stone adders.
//
// Interface: a, b (32 bits, unsigned) in; p (64 bits) out.
// Timing: purely combinational.
// The recursive halving follows the Vedic method the published design uses.
module vedic_mult_32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);

  localparam int unsigned H = 16;

  logic [2*H-1:0] q0, q1, q2, q3;

  vedic_mult_16x16 u_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q0));
  vedic_mult_16x16 u_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q1));
  vedic_mult_16x16 u_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q2));
  vedic_mult_16x16 u_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q3));

  vedic_combine #(.H(H)) u_sum (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );

endmodule
