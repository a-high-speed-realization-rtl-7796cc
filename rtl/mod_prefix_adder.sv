// mod_prefix_adder: W-bit modulo 2^W-1 adder with a cyclic Kogge-Stone
// parallel-prefix carry tree.
//
// Bit i generates g_i = a_i & b_i and propagates p_i = a_i ^ b_i. Modulo
// 2^W-1 the carry out of the top bit re-enters at bit 0 (end-around carry),
// so the carry into bit i+1 is the generate of the group of W bits that ends
// at bit i and wraps around through bit 0. Each of the ceil(log2 W) prefix
// levels combines, at every position, the group ending there with the group
// ending 2^l positions lower (indices taken modulo W) using Brent and Kung's
// associative operator (G,P) o (G',P') = (G | P&G', P&P'). After the last
// level every position holds a group that spans at least W bits; a span
// longer than W only repeats bits and, since g and p never are both 1, gives
// the same carry. The end-around carry is thereby folded into the tree
// instead of being added in a second pass.
//
// The sum bits s_i = p_i ^ c_i are congruent to a+b modulo 2^W-1. The value
// 2^W-1 (all ones), the second form of zero, is replaced by 0 so that the
// result always lies in [0, 2^W-2]. That zero fix-up is this design's own
// choice of how to reach that range.
//
// Interface: a, b, s are W-bit binary. Purely combinational; logic depth is
// one g/p level, ceil(log2 W) prefix levels, the sum XOR and the fix-up.
module mod_prefix_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] gen [LEVELS+1];  // group generate ending at each bit, per level
  logic [W-1:0] prp [LEVELS+1];  // group propagate ending at each bit, per level
  logic [W-1:0] carry;
  logic [W-1:0] raw;

  assign gen[0] = a & b;
  assign prp[0] = a ^ b;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      // partner: the group ending 2^l positions below bit i, cyclically
      localparam int unsigned J = (i + W - ((1 << l) % W)) % W;
      assign gen[l+1][i] = gen[l][i] | (prp[l][i] & gen[l][J]);
      assign prp[l+1][i] = prp[l][i] & prp[l][J];
    end
  end

  // carry into bit i is the wrap-around group generate ending at bit i-1
  for (genvar i = 0; i < W; i++) begin : g_carry
    assign carry[i] = gen[LEVELS][(i + W - 1) % W];
  end

  always_comb begin
    raw = prp[0] ^ carry;
    s   = (&raw) ? '0 : raw;
  end

endmodule
