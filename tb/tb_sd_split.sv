// tb_sd_split: checks the division block at its default width (32 digits)
// with random SD numbers and the all-zero / all-(+1) / all-(-1) corners:
// DP must equal the sum of the positive digits, DN must equal 2^32-1 plus the
// sum of the negative digits, so DP + DN == D + 2^32 - 1 exactly.
module tb_sd_split;
  import sd_pkg::*;
  import sd_tb_pkg::*;

  localparam int W = 32;
  sd_digit_t [W-1:0] d;
  logic [W-1:0] dp, dn;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic clk = 0;

  sd_split dut (.d(d), .dp(dp), .dn(dn));  // default width, 32 digits

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check_one(logic [127:0] v);
    longint pos, neg;
    d = v[2*W-1:0];
    #1;
    pos = 0; neg = 0;
    for (int i = W - 1; i >= 0; i--) begin
      pos = pos * 2; neg = neg * 2;
      if (v[2*i] && !v[2*i+1]) pos = pos + 1;
      if (v[2*i] &&  v[2*i+1]) neg = neg - 1;
    end
    checks++;
    if (longint'(dp) != pos) begin
      failures++;
      $display("FAIL dp=%h expected %h", dp, pos);
    end
    checks++;
    if (longint'(dn) != neg + (longint'(1) << W) - 1) begin
      failures++;
      $display("FAIL dn=%h expected %h", dn, neg + (longint'(1) << W) - 1);
    end
    checks++;
    if (longint'(dp) + longint'(dn) != sd_value(v, W) + (longint'(1) << W) - 1) begin
      failures++;
      $display("FAIL dp+dn does not match D + 2^W - 1");
    end
  endtask

  initial begin
    logic [127:0] p, n;
    p = '0; n = '0;
    for (int i = 0; i < W; i++) begin
      p[2*i +: 2] = 2'b01;
      n[2*i +: 2] = 2'b11;
    end
    check_one('0);
    check_one(p);
    check_one(n);
    // D = (-1,-1,-1,0,1,0): D+ = 2, D- = -56
    check_one({116'd0, 12'b11_11_11_00_01_00});
    checks++;
    if (dp != 32'd2 || dn != 32'hFFFF_FFFF - 32'd56) begin
      failures++;
      $display("FAIL worked example: dp=%0d dn=%h", dp, dn);
    end
    for (int k = 0; k < 2000; k++) check_one(sd_random(W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
