// sd_tb_pkg: reference arithmetic for the testbenches. Signed-digit vectors
// are passed as packed bit vectors of up to 64 digits, two bits per digit
// ({sign, magnitude}, digit 0 in bits [1:0]), and evaluated with plain
// integer arithmetic, independently of the design's own helper functions.
package sd_tb_pkg;

  // Integer value of an ndig-digit SD vector.
  function automatic longint sd_value(logic [127:0] v, int ndig);
    longint acc = 0;
    for (int i = ndig - 1; i >= 0; i--) begin
      acc = acc * 2;
      if (v[2*i]) acc = acc + (v[2*i+1] ? -1 : 1);
    end
    return acc;
  endfunction

  // Random SD vector: each digit -1, 0 or +1 with equal chance.
  function automatic logic [127:0] sd_random(int ndig);
    logic [127:0] v = '0;
    for (int i = 0; i < ndig; i++) begin
      case ($urandom_range(2))
        0: v[2*i +: 2] = 2'b00;
        1: v[2*i +: 2] = 2'b01;
        default: v[2*i +: 2] = 2'b11;
      endcase
    end
    return v;
  endfunction

  // SD vector with digits 0/+1 copied from a binary number.
  function automatic logic [127:0] sd_from_bin(longint unsigned b, int ndig);
    logic [127:0] v = '0;
    for (int i = 0; i < ndig; i++) v[2*i] = b[i];
    return v;
  endfunction

  // Least non-negative residue of v modulo m (m > 0).
  function automatic longint mod_pos(longint v, longint m);
    longint r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  // True when every digit of v is canonical (no {1,0} "negative zero").
  function automatic bit sd_canonical(logic [127:0] v, int ndig);
    for (int i = 0; i < ndig; i++)
      if (v[2*i +: 2] == 2'b10) return 1'b0;
    return 1'b1;
  endfunction

endpackage
