// tb_msda: checks the modulo 2^n+mu signed-digit adder at its default size
// and in the configurations the converter uses (n+1 and 2n-1 style moduli),
// plus the plain modulo 2^n case, with random and all-ones operands.
module tb_msda;
  int c [5], f [5];
  logic d [5];
  int checks, failures;
  int cycles = 0;
  logic clk = 0;

  msda_checker #(.NDIG(16), .MU(-1))              u0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  msda_checker #(.NDIG(16), .MU(1))               u1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  msda_checker #(.NDIG(32), .MU(-1))              u2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  msda_checker #(.NDIG(4),  .MU(1),  .COUNT(500)) u3 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  msda_checker #(.NDIG(8),  .MU(0),  .COUNT(500)) u4 (.checks(c[4]), .failures(f[4]), .done(d[4]));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
      $finish;
    end
  end

  initial begin
    #2;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
