// msda: NDIG-digit modulo m signed-digit adder, m = 2^NDIG + MU, MU in {-1,0,+1}.
//
// NDIG sdfa slices add two SD numbers in parallel. The carry leaving the top
// slice has weight 2^NDIG, which is congruent to -MU modulo m, so it is fed
// back into slice 0 multiplied by -MU (a 1-by-1 digit multiplier: passed
// unchanged for 2^n-1, negated for 2^n+1, dropped for 2^n). Slice 0 also
// needs the "lower digit pair" that its ADD1 rule looks at; it is the top
// pair scaled by -MU, because the carry it will receive has that sign. The
// result is an NDIG-digit SD number congruent to x + y modulo m, in the
// redundant range [-(2^NDIG-1), 2^NDIG-1]. The delay is that of one slice,
// whatever NDIG is. The slice structure and the 1-by-1 multiplier in the
// feedback are the published design; feeding slice 0 the scaled top pair as
// its lower neighbour is this design's own reading of how the ring closes.
//
// Interface: x, y, s are sd_digit_t [NDIG-1:0], digit 0 least significant.
// Purely combinational. The default size (16 digits, modulo 2^16-1) is one
// converter configuration; the converter itself instantiates a 16-digit
// modulo 2^16+1 adder and two 32-digit modulo 2^32-1 adders.
module msda
  import sd_pkg::*;
#(
  parameter int unsigned NDIG = 16,
  parameter int          MU   = -1   // m = 2^NDIG + MU
) (
  input  sd_digit_t [NDIG-1:0] x,
  input  sd_digit_t [NDIG-1:0] y,
  output sd_digit_t [NDIG-1:0] s
);

  initial begin
    assert (MU >= -1 && MU <= 1) else $error("msda: MU must be -1, 0 or +1");
    assert (NDIG >= 2) else $error("msda: NDIG must be at least 2");
  end

  sd_digit_t [NDIG-1:0] x_lo, y_lo;  // lower digit pair seen by each slice
  sd_digit_t [NDIG-1:0] c_in;        // carry into each slice
  sd_digit_t [NDIG-1:0] c_out;       // carry out of each slice

  always_comb begin
    x_lo[0] = sd_scale(x[NDIG-1], -MU);
    y_lo[0] = sd_scale(y[NDIG-1], -MU);
    c_in[0] = sd_scale(c_out[NDIG-1], -MU);
    for (int i = 1; i < NDIG; i++) begin
      x_lo[i] = x[i-1];
      y_lo[i] = y[i-1];
      c_in[i] = c_out[i-1];
    end
  end

  for (genvar i = 0; i < NDIG; i++) begin : g_slice
    sdfa u_sdfa (
      .x    (x[i]),
      .y    (y[i]),
      .x_lo (x_lo[i]),
      .y_lo (y_lo[i]),
      .c_in (c_in[i]),
      .c_out(c_out[i]),
      .s    (s[i])
    );
  end

endmodule
