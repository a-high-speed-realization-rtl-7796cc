// ppa_checker: drives one mod_prefix_adder instance and checks
// s == (a + b) mod (2^W - 1), which also demands the single zero form.
// Widths up to 10 bits are checked exhaustively, wider ones with random
// operands plus the all-zero / all-one corners.
module ppa_checker #(
  parameter int unsigned W     = 32,
  parameter int          COUNT = 3000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import sd_tb_pkg::*;

  logic [W-1:0] a, b, s;
  mod_prefix_adder #(.W(W)) dut (.a(a), .b(b), .s(s));

  localparam longint MOD = (longint'(1) << W) - 1;

  task automatic check_one(longint unsigned av, longint unsigned bv);
    a = av[W-1:0];
    b = bv[W-1:0];
    #1;
    checks++;
    if (longint'(s) != mod_pos(longint'(a) + longint'(b), MOD)) begin
      failures++;
      $display("FAIL ppa W=%0d a=%h b=%h s=%h", W, a, b, s);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    if (W <= 10) begin
      for (longint i = 0; i <= MOD; i++)
        for (longint j = 0; j <= MOD; j++) check_one(i, j);
    end else begin
      check_one(0, 0);
      check_one(MOD, 0);
      check_one(MOD, MOD);
      check_one(1, MOD - 1);
      check_one(MOD - 1, MOD - 1);
      for (int k = 0; k < COUNT; k++)
        check_one({$urandom, $urandom}, {$urandom, $urandom});
    end
    done = 1;
  end
endmodule
