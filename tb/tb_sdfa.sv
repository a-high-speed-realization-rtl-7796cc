// tb_sdfa: exhaustive check of one signed-digit full adder slice.
// For every digit pair (x, y), every lower pair (x_lo, y_lo) and every carry
// the lower slice could legally send (0 or the sign of x_lo + y_lo), it checks
// that the slice conserves value, 2*c_out + s == x + y + c_in, that c_out is
// 0 or has the sign of x + y, and that all outputs are canonical digits.
module tb_sdfa;
  import sd_pkg::*;

  sd_digit_t x, y, x_lo, y_lo, c_in, c_out, s;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  sdfa dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int dv(sd_digit_t d);
    return d.a ? (d.s ? -1 : 1) : 0;
  endfunction
  function automatic sd_digit_t dg(int v);
    return (v > 0) ? 2'b01 : (v < 0) ? 2'b11 : 2'b00;
  endfunction

  initial begin
    for (int a = -1; a <= 1; a++)
    for (int b = -1; b <= 1; b++)
    for (int al = -1; al <= 1; al++)
    for (int bl = -1; bl <= 1; bl++)
    for (int ci = 0; ci <= 1; ci++) begin
      int lsum, cin_v, sum_v;
      lsum  = al + bl;
      cin_v = ci ? ((lsum > 0) ? 1 : (lsum < 0) ? -1 : 0) : 0;
      if ((lsum == 2 || lsum == -2) && ci == 0) continue;  // carry forced
      if (lsum == 0 && al != 0 && ci == 1) continue;
      x = dg(a); y = dg(b); x_lo = dg(al); y_lo = dg(bl); c_in = dg(cin_v);
      #1;
      sum_v = a + b;
      checks++;
      if (2 * dv(c_out) + dv(s) != sum_v + cin_v) begin
        failures++;
        $display("FAIL value x=%0d y=%0d lo=%0d,%0d cin=%0d -> c=%0d s=%0d",
                 a, b, al, bl, cin_v, dv(c_out), dv(s));
      end
      checks++;
      if (dv(c_out) * sum_v < 0) begin
        failures++;
        $display("FAIL carry sign x=%0d y=%0d c=%0d", a, b, dv(c_out));
      end
      checks++;
      if (c_out == 2'b10 || s == 2'b10) begin
        failures++;
        $display("FAIL non-canonical zero");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
