// Unsigned WIDTH x WIDTH Vedic multiplier (Urdhva Tiryagbhyam sutra) whose
// partial-product additions are done by Kogge-Stone adders.
//
// How it works: with H = WIDTH/2, each operand is split into a high and a low
// half, four H x H products are formed in parallel (two "vertical": aL*bL and
// aH*bH; two "crosswise": aH*bL and aL*bH) and summed as
//     p = aL*bL + (aH*bL + aL*bH) << H + aH*bH << 2H
// by three Kogge-Stone adders (vedic_combine).  Each H x H product is built the
// same way, down to the 2x2 base cell made of two half adders.  The ladder is
// written as one module per size (vedic_mult_2x2, _4x4, _8x8, _16x16,
// _32x32); this module selects the rung for WIDTH.
//
// Interface: a, b (WIDTH bits, unsigned) in; p (2*WIDTH bits) out.
// Timing: purely combinational; depth grows as log2(WIDTH) combining stages,
// each of log2-depth adders.
//
// WIDTH is 2, 4, 8, 16 or 32.  The default of 8 is the multiplier of the
// filter; 16 and 32 are the other sizes the published design reports.  The
// method and the Kogge-Stone adders follow the published design; the
// arrangement of the three additions in each stage is this design's choice.
module vedic_mult #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  if (WIDTH == 2) begin : g_w2
    vedic_mult_2x2 u_mul (.a(a), .b(b), .p(p));
  end else if (WIDTH == 4) begin : g_w4
    vedic_mult_4x4 u_mul (.a(a), .b(b), .p(p));
  end else if (WIDTH == 8) begin : g_w8
    vedic_mult_8x8 u_mul (.a(a), .b(b), .p(p));
  end else if (WIDTH == 16) begin : g_w16
    vedic_mult_16x16 u_mul (.a(a), .b(b), .p(p));
  end else if (WIDTH == 32) begin : g_w32
    vedic_mult_32x32 u_mul (.a(a), .b(b), .p(p));
  end else begin : g_bad_width
    $error("vedic_mult: WIDTH must be 2, 4, 8, 16 or 32");
  end

endmodule
