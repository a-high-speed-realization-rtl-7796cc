// crt_checker: drives one crt_converter of size N. Every X in [0, M) is
// applied when M is below EXHAUSTIVE_LIMIT, otherwise COUNT random values
// plus the range edges; each output is compared with X.
module crt_checker #(
  parameter int unsigned N                = 4,
  parameter int          COUNT            = 50000,
  parameter longint      EXHAUSTIVE_LIMIT = 100000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam longint unsigned M1 = longint'(1) << N;
  localparam longint unsigned M2 = M1 - 1;
  localparam longint unsigned M3 = M1 + 1;
  localparam longint unsigned M  = M1 * M2 * M3;

  logic [N-1:0]   x1, x2;
  logic [N:0]     x3;
  logic [3*N-1:0] xb;

  crt_converter #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .xb(xb));

  task automatic apply(longint unsigned x);
    x1 = N'(x % M1);
    x2 = N'(x % M2);
    x3 = (N+1)'(x % M3);
    #1;
    checks++;
    if (longint'(xb) != x) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d X=%0d residues (%0d,%0d,%0d) gave %0d", N, x, x1, x2, x3, xb);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    if (M < EXHAUSTIVE_LIMIT) begin
      for (longint unsigned x = 0; x < M; x++) apply(x);
    end else begin
      apply(0); apply(M - 1); apply(M1); apply(M3 - 1);
      for (int k = 0; k < COUNT; k++) apply({$urandom, $urandom} % M);
    end
    done = 1;
  end
endmodule
