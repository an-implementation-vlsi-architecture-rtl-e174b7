// 2x2-bit Vedic (Urdhva Tiryagbhyam, "vertically and crosswise") multiplier:
// the base cell from which wider Vedic multipliers are built.
//
// How it works: the vertical product a0*b0 gives bit 0.  The two crosswise
// products a1*b0 and a0*b1 go into a half adder whose sum is bit 1.  The
// second vertical product a1*b1 and that half adder's carry go into a
// second half adder, whose sum and carry are bits 2 and 3.
//
// Interface: a, b (2 bits, unsigned) in; p (4 bits) out.
// Timing: purely combinational, two half-adder levels.
//
// The construction from half adders follows the published design's statement
// that the basic Vedic cell consists of adders of that kind; the exact gate
// arrangement is the usual one for this sutra.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic cross_sum, cross_carry;

  // Half adder on the two crosswise products.
  assign cross_sum   = (a[1] & b[0]) ^ (a[0] & b[1]);
  assign cross_carry = (a[1] & b[0]) & (a[0] & b[1]);

  assign p[0] = a[0] & b[0];
  assign p[1] = cross_sum;
  // Half adder on the upper vertical product and the cross carry.
  assign p[2] = (a[1] & b[1]) ^ cross_carry;
  assign p[3] = (a[1] & b[1]) & cross_carry;

endmodule
