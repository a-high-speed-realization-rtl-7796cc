// crt_converter: residue-to-binary converter for the moduli set
// {2^N, 2^N-1, 2^N+1}, built from signed-digit modular adders and a
// modulo 2^(2N)-1 parallel-prefix adder.
//
// Given x1 = X mod 2^N, x2 = X mod 2^N-1 and x3 = X mod 2^N+1, it returns
// X, 0 <= X < M = 2^N(2^(2N)-1). The Chinese remainder theorem for this
// moduli set reduces to
//   X = 2^N * D + x1,  D = <-2^N*TA + (2^N+1)*TB + (2^N-1)*TC> mod 2^(2N)-1
// with TA = x1, TB = <2^(N-1) x2> mod 2^N-1 and
// TC = <2^(N-1) x3 + x3> mod 2^N+1. The low N bits of X are x1 itself.
//
// The algorithm, the SD encoding and the block structure follow the
// published converter; the x3 input format, the single-zero fix-up in the
// final adder and the absence of registers are this design's own choices.
//
// Stage A (carry-free, signed digits):
//   TB, TC1   end-around shifts by N-1 digits          (sd_mod_shift)
//   E, F      2^N(-TA) and (2^N+1)TB, digit placement  (sd_const_mul)
//   TC        N-digit modulo 2^N+1 MSDA: TC1 + x3        (msda, in parallel
//   GB        2N-digit modulo 2^(2N)-1 MSDA: E + F        with GB)
//   GA        (2^N-1)TC = 2^N*TC + (-TC)                 (sd_const_mul)
//   D         2N-digit modulo 2^(2N)-1 MSDA: GB + GA     (msda)
// Stage B (back to plain binary):
//   DP, DN    division block: positive digits / one's complement of the
//             negative digits                            (sd_split)
//   b3,b2     modulo 2^(2N)-1 prefix adder of DP and DN, in [0, 2^(2N)-2]
//
// Interface: x1, x2 are N-bit binary; x3 is (N+1)-bit binary because the
// residue 2^N needs one more bit. That value is handed to stage A as the SD
// number -1 (congruent modulo 2^N+1), this design's own choice of input
// format. xb = {b3, b2, b1} is the 3N-bit binary result; its low N bits are
// wired straight from x1, as the algorithm prescribes (b1 = k1 = x1).
// Purely combinational: the critical path is two MSDA delays (independent of
// N) plus the prefix adder (logarithmic in N). Register the ports outside if
// a pipeline is wanted.
module crt_converter
  import sd_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   x1,  // X mod 2^N
  input  logic [N-1:0]   x2,  // X mod 2^N-1, 0 .. 2^N-2 (2^N-1 is read as 0)
  input  logic [N:0]     x3,  // X mod 2^N+1, 0 .. 2^N
  output logic [3*N-1:0] xb   // X
);

  sd_digit_t [N-1:0]   ta, tb, tc1, tc, x2_sd, x3_sd;
  sd_digit_t [2*N-1:0] e, f, gb, ga, d;
  logic      [2*N-1:0] dp, dn, d_bin;

  // residues into SD form: binary bits are already SD digits 0/+1
  always_comb begin
    for (int i = 0; i < N; i++) begin
      ta[i]    = x1[i] ? SD_POS : SD_ZERO;
      x2_sd[i] = x2[i] ? SD_POS : SD_ZERO;
      x3_sd[i] = x3[i] ? SD_POS : SD_ZERO;
    end
    if (x3[N]) x3_sd[0] = SD_NEG;  // 2^N == -1 (mod 2^N+1)
  end

  // (2A) TB = <2^(N-1) x2> mod 2^N-1, TC1 = <2^(N-1) x3> mod 2^N+1
  sd_mod_shift #(.NDIG(N), .SHIFT(N-1), .MU(-1)) u_shift_tb  (.x(x2_sd), .y(tb));
  sd_mod_shift #(.NDIG(N), .SHIFT(N-1), .MU(1))  u_shift_tc1 (.x(x3_sd), .y(tc1));

  // (2B) E = 2^N(-TA), F = (2^N+1)TB
  sd_const_mul #(.NDIG(N), .HI(-1), .LO(0)) u_block_e (.x(ta), .y(e));
  sd_const_mul #(.NDIG(N), .HI(1),  .LO(1)) u_block_f (.x(tb), .y(f));

  // (2C) TC = <TC1 + x3> mod 2^N+1, GB = <E + F> mod 2^(2N)-1
  msda #(.NDIG(N),   .MU(1))  u_msda_tc (.x(tc1), .y(x3_sd), .s(tc));
  msda #(.NDIG(2*N), .MU(-1)) u_msda_gb (.x(e),   .y(f),     .s(gb));

  // (2D) GA = (2^N-1)TC
  sd_const_mul #(.NDIG(N), .HI(1), .LO(-1)) u_block_ga (.x(tc), .y(ga));

  // (2E) D = k3*2^N + k2 = <GB + GA> mod 2^(2N)-1
  msda #(.NDIG(2*N), .MU(-1)) u_msda_d (.x(gb), .y(ga), .s(d));

  // Algorithm B: division block and modulo 2^(2N)-1 prefix adder
  sd_split #(.W(2*N)) u_split (.d(d), .dp(dp), .dn(dn));
  mod_prefix_adder #(.W(2*N)) u_ppa (.a(dp), .b(dn), .s(d_bin));

  assign xb = {d_bin, x1};

  // input legality: 2^N is the only x3 value with bit N set
  always_comb begin
    if (x3[N]) assert (x3[N-1:0] == '0) else $error("crt_converter: x3 above 2^N");
  end

endmodule
