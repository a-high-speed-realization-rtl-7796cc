// sd_pkg: shared types and helpers for radix-2 signed-digit (SD) arithmetic.
//
// A signed digit takes a value in {-1, 0, +1} and is carried on two wires,
// a sign bit and a magnitude bit (x = [x^s, x^a]): {s,a} = {0,0} is 0,
// {0,1} is +1 and {1,1} is -1. Logic in this design always produces the
// canonical zero {0,0}; {1,0} read on an input is taken as 0 as well.
// Negating a digit flips its sign bit when the magnitude is set, so an SD
// number is negated digit by digit with no carry.
package sd_pkg;

  typedef struct packed {
    logic s;  // sign: 1 = negative
    logic a;  // magnitude: 1 = digit is non-zero
  } sd_digit_t;

  localparam sd_digit_t SD_ZERO = '{s: 1'b0, a: 1'b0};
  localparam sd_digit_t SD_POS  = '{s: 1'b0, a: 1'b1};
  localparam sd_digit_t SD_NEG  = '{s: 1'b1, a: 1'b1};

  // Value of a digit as a 2-bit two's complement number (-1, 0 or +1).
  function automatic logic signed [1:0] sd_val(sd_digit_t d);
    return d.a ? (d.s ? 2'sb11 : 2'sb01) : 2'sb00;
  endfunction

  // Digit for a value in {-1, 0, +1}.
  function automatic sd_digit_t sd_from(logic signed [1:0] v);
    sd_digit_t d;
    d.a = (v != 2'sb00);
    d.s = v[1] & d.a;
    return d;
  endfunction

  // Negation of a digit, canonical zero kept.
  function automatic sd_digit_t sd_neg(sd_digit_t d);
    sd_digit_t r;
    r.a = d.a;
    r.s = d.a & ~d.s;
    return r;
  endfunction

  // Digit multiplied by a constant k in {-1, 0, +1}.
  function automatic sd_digit_t sd_scale(sd_digit_t d, int k);
    if (k > 0)       return sd_from(sd_val(d));
    else if (k < 0)  return sd_neg(d);
    else             return SD_ZERO;
  endfunction

endpackage
