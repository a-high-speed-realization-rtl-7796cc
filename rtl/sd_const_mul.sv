// sd_const_mul: multiplies an NDIG-digit SD number by HI*2^NDIG + LO, with
// HI and LO in {-1, 0, +1}, giving a 2*NDIG-digit SD number.
//
// The two partial products do not overlap: the upper NDIG digits are the
// input scaled by HI and the lower NDIG digits the input scaled by LO, each
// a digit-wise sign change. The converter uses three instances:
//   Block E : HI = -1, LO =  0   E  = 2^n * (-TA)
//   Block F : HI = +1, LO = +1   F  = (2^n + 1) * TB
//   Block GA: HI = +1, LO = -1   GA = (2^n - 1) * TC = 2^n*TC + (-TC)
// Interface: x is sd_digit_t [NDIG-1:0], y is sd_digit_t [2*NDIG-1:0].
// Purely combinational; digits scaled by +1 are plain wires. The three
// blocks are the published ones; merging them into one parameterised module
// is this design's own choice.
module sd_const_mul
  import sd_pkg::*;
#(
  parameter int unsigned NDIG = 16,
  parameter int          HI   = 1,
  parameter int          LO   = -1
) (
  input  sd_digit_t [NDIG-1:0]   x,
  output sd_digit_t [2*NDIG-1:0] y
);

  initial begin
    assert (HI >= -1 && HI <= 1 && LO >= -1 && LO <= 1)
      else $error("sd_const_mul: HI and LO must be -1, 0 or +1");
  end

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      y[i]      = sd_scale(x[i], LO);
      y[i+NDIG] = sd_scale(x[i], HI);
    end
  end

endmodule
