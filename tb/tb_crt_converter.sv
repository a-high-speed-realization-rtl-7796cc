// tb_crt_converter: end-to-end test of the residue-to-binary converter at its
// default size, n = 16 (moduli 2^16, 2^16-1, 2^16+1, dynamic range
// M = 2^16 * (2^32-1)).
//
// For each test value X in [0, M) the residues are formed with plain integer
// arithmetic, applied to the converter, and the output is compared with X.
// Besides random values it applies the edges of the range, values whose
// 2^16+1 residue is 2^16 (the one input that needs the negative digit) and
// values below 2^16 (D = 0, which exercises the zero fix-up of the final
// adder). It counts how often each internal mechanism fired: the negative
// x3 digit, the end-around carry of each of the three MSDAs, negative digits
// in TC and in D, the end-around carry of the prefix adder and its zero
// fix-up, and fails if one never did. The converter is combinational; each
// vector is sampled 1 time unit after it is applied.
module tb_crt_converter;
  localparam int N = 16;
  localparam longint unsigned M1 = longint'(1) << N;
  localparam longint unsigned M2 = M1 - 1;
  localparam longint unsigned M3 = M1 + 1;
  localparam longint unsigned M  = M1 * M2 * M3;

  logic [N-1:0]   x1, x2;
  logic [N:0]     x3;
  logic [3*N-1:0] xb;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic clk = 0;

  // mechanism counters
  int n_x3_top, n_eac_tc, n_eac_gb, n_eac_d, n_tc_neg, n_d_neg, n_ppa_eac, n_zero_fix;

  crt_converter dut (.x1(x1), .x2(x2), .x3(x3), .xb(xb));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic apply(longint unsigned x);
    logic any_tc_neg, any_d_neg;
    x1 = N'(x % M1);
    x2 = N'(x % M2);
    x3 = (N+1)'(x % M3);
    #1;
    checks++;
    if (longint'(xb) != x) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d residues (%0d,%0d,%0d) gave %0d", x, x1, x2, x3, xb);
    end
    any_tc_neg = 0;
    for (int i = 0; i < N; i++) any_tc_neg |= dut.tc[i].a & dut.tc[i].s;
    any_d_neg = 0;
    for (int i = 0; i < 2 * N; i++) any_d_neg |= dut.d[i].a & dut.d[i].s;
    if (x3[N])                               n_x3_top++;
    if (dut.u_msda_tc.c_out[N-1].a)          n_eac_tc++;
    if (dut.u_msda_gb.c_out[2*N-1].a)        n_eac_gb++;
    if (dut.u_msda_d.c_out[2*N-1].a)         n_eac_d++;
    if (any_tc_neg)                          n_tc_neg++;
    if (any_d_neg)                           n_d_neg++;
    if (dut.u_ppa.carry[0])                  n_ppa_eac++;
    if (&dut.u_ppa.raw)                      n_zero_fix++;
  endtask

  function automatic longint unsigned rand_below(longint unsigned lim);
    return {$urandom, $urandom} % lim;
  endfunction

  task automatic need(string what, int n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-34s %0d", what, n);
    end
  endtask

  initial begin
    n_x3_top = 0; n_eac_tc = 0; n_eac_gb = 0; n_eac_d = 0;
    n_tc_neg = 0; n_d_neg = 0; n_ppa_eac = 0; n_zero_fix = 0;
    // edges of the range
    apply(0); apply(1); apply(M1 - 1); apply(M1); apply(M - 1); apply(M - 2);
    apply(M / 2);
    // x3 = 2^n: X = k*(2^n+1) - 1
    for (int k = 0; k < 200; k++) apply(M3 * (rand_below(M / M3 - 1) + 1) - 1);
    // D = 0: X < 2^n
    for (int k = 0; k < 200; k++) apply(rand_below(M1));
    // random values over the whole range
    for (int k = 0; k < 200000; k++) apply(rand_below(M));
    $display("mechanisms exercised (vectors):");
    need("x3 = 2^n (negative input digit)", n_x3_top);
    need("MSDA mod 2^n+1 end-around carry", n_eac_tc);
    need("MSDA GB mod 2^2n-1 end-around carry", n_eac_gb);
    need("MSDA D mod 2^2n-1 end-around carry", n_eac_d);
    need("negative digit in TC", n_tc_neg);
    need("negative digit in D", n_d_neg);
    need("prefix adder end-around carry", n_ppa_eac);
    need("prefix adder zero fix-up", n_zero_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
