// Kogge-Stone adder: unsigned WIDTH-bit + WIDTH-bit -> WIDTH+1-bit sum.
//
// How it works: every bit first forms a generate (a & b) and a propagate
// (a ^ b) signal.  log2(WIDTH) prefix stages then combine each bit's group
// (G, P) with the group D = 1, 2, 4, ... places below it:
//     G' = G | (P & G_below),  P' = P & P_below
// so that after the last stage G[i] is the carry out of bits i..0.  The sum
// bit i is the bit's own propagate XOR the carry into it (G[i-1]); the carry
// out of the top bit is the extra sum bit.  Each stage is a row of identical
// black cells with fan-out 2, which is what gives the adder its log2 depth.
//
// Interface: a, b (WIDTH bits) in; sum (WIDTH+1 bits) out.  There is no carry
// input, matching the 8-bit (k1, k2 -> k3[8:0]) and 16-bit
// (p1, p2 -> p3[16:0]) adders of the published design.
// Timing: purely combinational, log2(WIDTH) prefix levels.
//
// The adder widths 8 and 16 and the port shape follow the published design;
// the prefix network is the standard Kogge-Stone one, as the design does not
// draw its cells.  Any WIDTH >= 1 is accepted.
module ks_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum
);

  localparam int unsigned STAGES = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  logic [WIDTH-1:0] prop0;   // bit propagate, a ^ b
  logic [WIDTH-1:0] grp_g;   // group generate after the prefix network
  logic [WIDTH:0]   carry;   // carry into each bit, carry[WIDTH] = carry out

  always_comb begin
    logic [WIDTH-1:0] g, p, g_next, p_next;
    prop0 = a ^ b;
    g     = a & b;
    p     = prop0;
    for (int s = 0; s < STAGES; s++) begin
      g_next = g;
      p_next = p;
      for (int i = (1 << s); i < WIDTH; i++) begin
        g_next[i] = g[i] | (p[i] & g[i - (1 << s)]);
        p_next[i] = p[i] & p[i - (1 << s)];
      end
      g = g_next;
      p = p_next;
    end
    grp_g = g;
  end

  assign carry = {grp_g, 1'b0};
  assign sum   = {carry[WIDTH], prop0 ^ carry[WIDTH-1:0]};

endmodule
