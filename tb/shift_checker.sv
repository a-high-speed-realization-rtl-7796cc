// shift_checker: drives one sd_mod_shift instance with random SD residues
// and checks that the output is congruent to 2^SHIFT times the input modulo
// 2^NDIG + MU.
module shift_checker #(
  parameter int unsigned NDIG  = 16,
  parameter int unsigned SHIFT = 15,
  parameter int          MU    = 1,
  parameter int          COUNT = 1000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import sd_pkg::*;
  import sd_tb_pkg::*;

  sd_digit_t [NDIG-1:0] x, y;
  sd_mod_shift #(.NDIG(NDIG), .SHIFT(SHIFT), .MU(MU)) dut (.x(x), .y(y));

  localparam longint MOD = (longint'(1) << NDIG) + MU;

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int k = 0; k < COUNT; k++) begin
      logic [127:0] xv;
      longint xval, got;
      // half of the vectors are plain binary residues as the converter feeds
      xv = (k % 2) ? sd_random(NDIG)
                   : sd_from_bin(longint'($urandom) & ((longint'(1) << NDIG) - 1), NDIG);
      x = xv[2*NDIG-1:0];
      #1;
      xval = sd_value(xv, NDIG);
      got  = sd_value(128'(y), NDIG);
      checks++;
      if (mod_pos(got, MOD) != mod_pos(xval * (longint'(1) << SHIFT), MOD)) begin
        failures++;
        $display("FAIL shift NDIG=%0d SHIFT=%0d MU=%0d x=%0d y=%0d", NDIG, SHIFT, MU, xval, got);
      end
    end
    done = 1;
  end
endmodule
