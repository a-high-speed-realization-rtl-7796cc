// msda_checker: drives one msda instance of the given size and modulus with
// random and corner-case SD operands and checks that the sum is congruent to
// x + y modulo 2^NDIG + MU and made of canonical digits. Reports its counts
// through its ports and raises done when finished.
module msda_checker #(
  parameter int unsigned NDIG  = 16,
  parameter int          MU    = -1,
  parameter int          COUNT = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import sd_pkg::*;
  import sd_tb_pkg::*;

  sd_digit_t [NDIG-1:0] x, y, s;
  msda #(.NDIG(NDIG), .MU(MU)) dut (.x(x), .y(y), .s(s));

  localparam longint MOD = (longint'(1) << NDIG) + MU;

  task automatic check_one(logic [127:0] xv, logic [127:0] yv);
    longint exp_r, got;
    x = xv[2*NDIG-1:0];
    y = yv[2*NDIG-1:0];
    #1;
    got   = sd_value(128'(s), NDIG);
    exp_r = mod_pos(sd_value(xv, NDIG) + sd_value(yv, NDIG), MOD);
    checks++;
    if (mod_pos(got, MOD) != exp_r || !sd_canonical(128'(s), NDIG)) begin
      failures++;
      $display("FAIL msda NDIG=%0d MU=%0d x=%0d y=%0d s=%0d expected %0d mod %0d",
               NDIG, MU, sd_value(xv, NDIG), sd_value(yv, NDIG), got, exp_r, MOD);
    end
  endtask

  initial begin
    logic [127:0] all_pos, all_neg;
    checks = 0; failures = 0; done = 0;
    all_pos = '0; all_neg = '0;
    for (int i = 0; i < NDIG; i++) begin
      all_pos[2*i +: 2] = 2'b01;
      all_neg[2*i +: 2] = 2'b11;
    end
    check_one(all_pos, all_pos);   // maximum carries out of the top
    check_one(all_neg, all_neg);
    check_one(all_pos, all_neg);
    check_one('0, '0);
    for (int k = 0; k < COUNT; k++) check_one(sd_random(NDIG), sd_random(NDIG));
    done = 1;
  end
endmodule
