// tb_crt_sizes: runs the converter at the two smaller word lengths of the
// comparison table, n = 4 (every X of the 4080-value range) and n = 8
// (random values over the 2^8 * (2^16-1) range), to show the design is
// correct for other parameter values than its default n = 16.
module tb_crt_sizes;
  int c [2], f [2];
  logic d [2];
  int checks, failures;
  int cycles = 0;
  logic clk = 0;

  crt_checker #(.N(4)) u_n4 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  crt_checker #(.N(8)) u_n8 (.checks(c[1]), .failures(f[1]), .done(d[1]));

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
    wait (d[0] && d[1]);
    checks = c[0] + c[1];
    failures = f[0] + f[1];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
