// Combining stage of a Vedic multiplier: adds the four half-size partial
// products of a 2H x 2H multiplication with three Kogge-Stone adders.
//
// With the operands split as a = {aH, aL}, b = {bH, bL} (H bits each):
//     q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (2H bits each)
//     p  = q0 + (q1 + q2) << H + q3 << 2H
// computed as
//     s1 = q1 + q2             (2H-bit adder, 2H+1-bit result)
//     s2 = s1 + (q0 >> H)      (2H+1-bit adder)
//     s3 = q3 + (s2 >> H)      (2H-bit adder)
//     p  = {s3[2H-1:0], s2[H-1:0], q0[H-1:0]}
// The top bit of s2 and the carry out of s3 are always zero for products of
// H-bit numbers (the whole product fits in 4H bits); they are left unused.
//
// Interface: q0..q3 (2H bits) in; p (4H bits) out.  Purely combinational.
// The use of Kogge-Stone adders here follows the published design; the order
// of the three additions is this design's choice.
module vedic_combine #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] p
);

  logic [2*H:0]   s1;
  logic [2*H+1:0] s2;
  logic [2*H:0]   s3;

  ks_adder #(.WIDTH(2*H)) u_cross (
    .a(q1), .b(q2), .sum(s1)
  );
  ks_adder #(.WIDTH(2*H + 1)) u_mid (
    .a(s1), .b({{(H + 1){1'b0}}, q0[2*H-1:H]}), .sum(s2)
  );
  ks_adder #(.WIDTH(2*H)) u_high (
    .a(q3), .b({{(H - 1){1'b0}}, s2[2*H:H]}), .sum(s3)
  );

  assign p = {s3[2*H-1:0], s2[H-1:0], q0[H-1:0]};

endmodule
