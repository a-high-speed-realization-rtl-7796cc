// tb_mod_prefix_adder: checks the modulo 2^W-1 parallel-prefix adder at its
// default width (32 bits, the 2n of n = 16), exhaustively at 8 bits and at
// the non-power-of-two width 5, and with random operands at 16 bits.
module tb_mod_prefix_adder;
  int c [4], f [4];
  logic d [4];
  int checks, failures;
  int cycles = 0;
  logic clk = 0;

  ppa_checker #(.W(32)) u0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  ppa_checker #(.W(8))  u1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  ppa_checker #(.W(5))  u2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  ppa_checker #(.W(16)) u3 (.checks(c[3]), .failures(f[3]), .done(d[3]));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
      $finish;
    end
  end

  initial begin
    #2;
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
