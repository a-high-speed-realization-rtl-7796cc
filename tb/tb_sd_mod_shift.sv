// tb_sd_mod_shift: checks the end-around SD shifter at its default (TC1 path,
// modulo 2^16+1, shift by 15), for the TB path (modulo 2^16-1) and at other
// sizes and shift amounts.
module tb_sd_mod_shift;
  int c [4], f [4];
  logic d [4];
  int checks, failures;
  int cycles = 0;
  logic clk = 0;

  shift_checker #(.NDIG(16), .SHIFT(15), .MU(1))  u0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  shift_checker #(.NDIG(16), .SHIFT(15), .MU(-1)) u1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  shift_checker #(.NDIG(4),  .SHIFT(3),  .MU(1))  u2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  shift_checker #(.NDIG(8),  .SHIFT(5),  .MU(-1)) u3 (.checks(c[3]), .failures(f[3]), .done(d[3]));

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
