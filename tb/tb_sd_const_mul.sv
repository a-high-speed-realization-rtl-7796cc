// tb_sd_const_mul: checks the constant multiplier in its three uses
// (GA = (2^n-1)TC, the default; E = 2^n(-TA); F = (2^n+1)TB) and at n = 4.
module tb_sd_const_mul;
  int c [4], f [4];
  logic d [4];
  int checks, failures;
  int cycles = 0;
  logic clk = 0;

  const_mul_checker #(.NDIG(16), .HI(1),  .LO(-1)) u0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  const_mul_checker #(.NDIG(16), .HI(-1), .LO(0))  u1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  const_mul_checker #(.NDIG(16), .HI(1),  .LO(1))  u2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  const_mul_checker #(.NDIG(4),  .HI(1),  .LO(-1)) u3 (.checks(c[3]), .failures(f[3]), .done(d[3]));

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
