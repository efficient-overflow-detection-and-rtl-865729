// prc_harness: checks one rns_prc instance of size N. With EXHAUST set it
// converts every X in [0, M-1], M = 2^N (2^{4N}-1); otherwise NRAND random
// X. The residues are X mod 2^{2N}-1, 2^N and 2^{2N}+1, and alpha must be
// floor(X / 2^N) exactly (the zero value in its single binary code). Where
// x1 = 0 it also feeds the all-ones code of x1. It counts how often MUX 1
// took the CPA 2 result (sel) and how often CPA 1.
module prc_harness #(
  parameter int unsigned N       = 2,
  parameter bit          EXHAUST = 1'b1,
  parameter int unsigned NRAND   = 1000
) (
  output int   checks,
  output int   failures,
  output int   sel1_count,
  output int   sel0_count,
  output logic done
);
  typedef logic [127:0] wide_t;

  localparam wide_t ONE = 128'd1;
  localparam wide_t K   = (ONE << (4*N)) - 1;
  localparam wide_t M1  = (ONE << (2*N)) - 1;
  localparam wide_t M2  = (ONE << N);
  localparam wide_t M3  = (ONE << (2*N)) + 1;
  localparam wide_t M   = M2 * K;

  logic [2*N-1:0] x1;
  logic [N-1:0]   x2;
  logic [2*N:0]   x3;
  logic [4*N-1:0] alpha;
  logic           sel;

  rns_prc #(.N(N)) dut (.*);

  task automatic run(input wide_t X, input bit alt_zero);
    x1 = (alt_zero) ? '1 : (2*N)'(X % M1);
    x2 = N'(X % M2);
    x3 = (2*N+1)'(X % M3);
    #1;
    checks++;
    if (sel) sel1_count++; else sel0_count++;
    if (wide_t'(alpha) != (X >> N)) begin
      failures++;
      if (failures < 10)
        $display("FAIL prc N=%0d X=%0d (%0d,%0d,%0d): alpha %0d exp %0d",
                 N, X, x1, x2, x3, alpha, X >> N);
    end
  endtask

  initial begin
    wide_t X;
    checks = 0; failures = 0; sel1_count = 0; sel0_count = 0; done = 1'b0;
    if (EXHAUST) begin
      for (X = 0; X < M; X++) begin
        run(X, 1'b0);
        if (X % M1 == 0) run(X, 1'b1);
      end
    end else begin
      run(0, 1'b0); run(0, 1'b1); run(M - 1, 1'b0);
      for (int unsigned i = 0; i < NRAND; i++) begin
        X = {$urandom, $urandom, $urandom, $urandom} % M;
        run(X, 1'b0);
      end
    end
    done = 1'b1;
  end
endmodule
