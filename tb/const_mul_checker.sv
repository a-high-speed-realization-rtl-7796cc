// const_mul_checker: drives one sd_const_mul instance with random SD numbers
// and checks that the 2*NDIG-digit output equals (HI*2^NDIG + LO) times the
// input exactly.
module const_mul_checker #(
  parameter int unsigned NDIG  = 16,
  parameter int          HI    = 1,
  parameter int          LO    = -1,
  parameter int          COUNT = 1000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import sd_pkg::*;
  import sd_tb_pkg::*;

  sd_digit_t [NDIG-1:0]   x;
  sd_digit_t [2*NDIG-1:0] y;
  sd_const_mul #(.NDIG(NDIG), .HI(HI), .LO(LO)) dut (.x(x), .y(y));

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int k = 0; k < COUNT; k++) begin
      logic [127:0] xv;
      longint xval, got, expv;
      xv = sd_random(NDIG);
      x  = xv[2*NDIG-1:0];
      #1;
      xval = sd_value(xv, NDIG);
      got  = sd_value(128'(y), 2 * NDIG);
      expv = (longint'(HI) * (longint'(1) << NDIG) + longint'(LO)) * xval;
      checks++;
      if (got != expv || !sd_canonical(128'(y), 2 * NDIG)) begin
        failures++;
        $display("FAIL const_mul HI=%0d LO=%0d x=%0d y=%0d expected %0d", HI, LO, xval, got, expv);
      end
    end
    done = 1;
  end
endmodule
