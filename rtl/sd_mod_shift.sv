// sd_mod_shift: multiplies an NDIG-digit SD residue by 2^SHIFT modulo
// 2^NDIG + MU (MU = -1 or +1) by an end-around shift.
//
// A left shift by SHIFT moves the top SHIFT digits past weight 2^NDIG.
// Modulo 2^NDIG-1 that weight is 1, so those digits re-enter at the bottom
// unchanged (a rotation). Modulo 2^NDIG+1 it is -1, so they re-enter
// negated; in SD form that is only a sign-bit flip, which is why the
// 2^n+1 channel is handled as easily as the 2^n-1 one. No carries are formed.
// In the converter this block computes TB = <2^(n-1) x2> mod 2^n-1 and
// TC1 = <2^(n-1) x3> mod 2^n+1.
//
// Interface: x and y are sd_digit_t [NDIG-1:0]. Purely combinational, no
// logic beyond the sign inversion of the wrapped digits: the other output
// bits are wires from the input, so a synthesis tool reports them as
// feed-throughs. The shift-left realisation is the published one; the
// parameterisation (any SHIFT, either modulus) is this design's own.
module sd_mod_shift
  import sd_pkg::*;
#(
  parameter int unsigned NDIG  = 16,
  parameter int unsigned SHIFT = 15,  // 2^(n-1)
  parameter int          MU    = 1    // +1: modulo 2^NDIG+1, -1: modulo 2^NDIG-1
) (
  input  sd_digit_t [NDIG-1:0] x,
  output sd_digit_t [NDIG-1:0] y
);

  initial begin
    assert (MU == 1 || MU == -1) else $error("sd_mod_shift: MU must be -1 or +1");
    assert (SHIFT < NDIG) else $error("sd_mod_shift: SHIFT must be below NDIG");
  end

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      // digit i of the result comes from digit (i - SHIFT) mod NDIG
      if (i >= SHIFT) y[i] = x[(i+NDIG-SHIFT)%NDIG];             // plain shift
      else            y[i] = sd_scale(x[(i+NDIG-SHIFT)%NDIG], -MU); // wrapped
    end
  end

endmodule
