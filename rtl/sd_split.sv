// sd_split: the division block. Splits a W-digit SD number D into two
// non-negative binary numbers whose sum is congruent to D modulo 2^W-1.
//
// DP holds the positive digits of D (D+). DN holds the negative digits (D-)
// plus 2^W-1: since every digit of D- is 0 or -1, adding 2^W-1 is a digit-wise
// one's complement, so dn_i = 1 exactly where d_i is not -1:
//   d_i =  0 : dp_i = 0, dn_i = 1
//   d_i = +1 : dp_i = 1, dn_i = 1
//   d_i = -1 : dp_i = 0, dn_i = 0
// Then D = D+ + D- is congruent to DP + DN modulo 2^W-1, with both addends
// non-negative, ready for a binary modulo 2^W-1 adder.
//
// The digit rules are the published ones.
//
// Interface: d is sd_digit_t [W-1:0]; dp and dn are W-bit binary.
// Purely combinational, one gate level.
module sd_split
  import sd_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  sd_digit_t [W-1:0] d,
  output logic      [W-1:0] dp,
  output logic      [W-1:0] dn
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      dp[i] = d[i].a & ~d[i].s;
      dn[i] = ~(d[i].a & d[i].s);
    end
  end

endmodule
