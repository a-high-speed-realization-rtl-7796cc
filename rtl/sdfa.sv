// sdfa: radix-2 signed-digit full adder (one digit slice of the MSDA).
//
// The slice is split in two halves. ADD1 adds the digits x and y of its own
// position and, looking at the digit pair one position below (x_lo, y_lo),
// chooses an intermediate sum w and a carry c so that the carry arriving from
// below can never make the final digit overflow:
//   |x| == |y|                          : w = 0,        c = (x+y)/2
//   |x| != |y|, (x+y)*(x_lo+y_lo) <= 0  : w = x+y,      c = 0
//   |x| != |y|, (x+y)*(x_lo+y_lo) >  0  : w = -(x+y),   c = x+y
// ADD2 adds w and the carry c_in produced by the ADD1 of the position below;
// the result is always a single digit, so no carry ever ripples further than
// one position. The rule table and the ADD1/ADD2 split are the published
// ones; deriving the "lower pair" test from the sign of x_lo + y_lo and the
// range assertion are this design's own.
//
// Interface: all inputs and outputs are sd_digit_t. c_out depends only on
// x, y, x_lo, y_lo (not on c_in), so chaining slices forms no loop.
// Purely combinational.
module sdfa
  import sd_pkg::*;
(
  input  sd_digit_t x,
  input  sd_digit_t y,
  input  sd_digit_t x_lo,   // digit pair of the next lower position
  input  sd_digit_t y_lo,
  input  sd_digit_t c_in,   // ADD1 carry of the next lower position
  output sd_digit_t c_out,  // ADD1 carry to the next higher position
  output sd_digit_t s       // sum digit
);

  logic signed [2:0] sum_here;
  logic signed [2:0] sum_low;
  logic signed [2:0] w;
  logic signed [1:0] c;
  logic signed [2:0] s_full;

  // ADD1
  always_comb begin
    sum_here = 3'(sd_val(x)) + 3'(sd_val(y));
    sum_low  = 3'(sd_val(x_lo)) + 3'(sd_val(y_lo));
    if (x.a == y.a) begin
      // both zero or both non-zero: even sum, pass half of it up
      w = '0;
      c = 2'(sum_here >>> 1);
    end else if ((sum_low == '0) || (sum_low[2] != sum_here[2])) begin
      // lower pair has the opposite sign or is zero: keep the digit
      w = sum_here;
      c = '0;
    end else begin
      // lower pair has the same sign: send the digit up, leave its negation
      w = -sum_here;
      c = sum_here[1:0];
    end
  end

  // ADD2
  always_comb begin
    s_full = w + 3'(sd_val(c_in));
    c_out  = sd_from(c);
    s      = sd_from(s_full[1:0]);
  end

  // ADD1's choice guarantees that w + c_in never leaves the digit set, as
  // long as c_in comes from a slice that follows the same rule.
  always_comb begin
    assert (s_full >= -3'sd1 && s_full <= 3'sd1)
      else $error("sdfa: sum digit out of range (carry from an illegal lower slice)");
  end

endmodule
