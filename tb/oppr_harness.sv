// oppr_harness: checks one rns_oppr instance of size N against modular
// arithmetic. For NRAND random residues (x1 including the all-ones code,
// x3 up to 2^{2N}) it verifies, modulo K = 2^{4N}-1, that
//   psi1 = (2^{3N-1}+2^{N-1}) x1, psi2 = -2^{3N} x2,
//   psi3 = 2^{3N-1} x3,           psi4 = -2^{N-1} x3.
// It also checks that psi1..psi4 sum to floor(X/2^N) modulo K for a random
// X < M, which is the identity the converter relies on. Reports its counts
// and raises done when finished.
module oppr_harness #(
  parameter int unsigned N     = 2,
  parameter int unsigned NRAND = 1000
) (
  output int   checks,
  output int   failures,
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
  logic [4*N-1:0] psi1, psi2, psi3, psi4;

  rns_oppr #(.N(N)) dut (.*);

  function automatic wide_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check(input string what, input wide_t got, input wide_t exp);
    checks++;
    if (got % K != exp % K) begin
      failures++;
      if (failures < 10)
        $display("FAIL oppr N=%0d %s: x=(%0d,%0d,%0d) got %0h exp %0h (mod K)",
                 N, what, x1, x2, x3, got % K, exp % K);
    end
  endtask

  initial begin
    wide_t v1, v2, v3, X, s;
    checks = 0; failures = 0; done = 1'b0;
    x1 = '0; x2 = '0; x3 = '0;
    for (int unsigned i = 0; i < NRAND; i++) begin
      v1 = rnd128() % (M1 + 1);          // 0 .. 2^{2N}-1 (all ones = 0)
      v2 = rnd128() % M2;
      v3 = rnd128() % M3;                // 0 .. 2^{2N}
      if (i == 0) begin v1 = M1; v2 = 0; v3 = M3 - 1; end
      x1 = v1[2*N-1:0]; x2 = v2[N-1:0]; x3 = v3[2*N:0];
      #1;
      check("psi1", wide_t'(psi1), ((ONE << (3*N-1)) + (ONE << (N-1))) * v1);
      check("psi2", wide_t'(psi2), K - ((v2 << (3*N)) % K));
      check("psi3", wide_t'(psi3), (v3 << (3*N-1)) % K);
      check("psi4", wide_t'(psi4), K - ((v3 << (N-1)) % K));
      // sum identity for a consistent X
      X  = rnd128() % M;
      x1 = wide_t'(X % M1); x2 = wide_t'(X % M2); x3 = wide_t'(X % M3);
      #1;
      s = (wide_t'(psi1) + wide_t'(psi2) + wide_t'(psi3) + wide_t'(psi4)) % K;
      check("sum", s, X >> N);
    end
    done = 1'b1;
  end
endmodule
