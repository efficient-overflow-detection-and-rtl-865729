// detect_harness: checks one ovf_detect instance of size N. Operands are
// alpha values in [0, 2^{4N}-2] and modulo-2^N residues; a share of the
// cases is steered so that E lands on 2^{4N}-3 .. 2^{4N}, where the three
// overflow conditions separate. Expected values come from plain integer
// arithmetic: E = ax + ay, R = x2 + y2, beta = (R >= 2^N), and overflow =
// (2^N E + R >= M) with M = 2^N (2^{4N}-1). The per-condition flags are
// checked against their definitions and each is counted when it fires alone.
module detect_harness
  import rns_ovf_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned NRAND = 1000
) (
  output int   checks,
  output int   failures,
  output int   n_msb,
  output int   n_all_ones,
  output int   n_ones_beta,
  output int   n_none,
  output logic done
);
  typedef logic [127:0] wide_t;

  localparam wide_t ONE = 128'd1;
  localparam wide_t P   = ONE << (4*N);
  localparam wide_t K   = P - 1;
  localparam wide_t M2  = ONE << N;
  localparam wide_t M   = M2 * K;

  logic [4*N-1:0] alpha_x, alpha_y;
  logic [N-1:0]   x2, y2;
  logic [4*N:0]   e;
  logic [N:0]     r;
  logic           beta, overflow;
  ovf_cond_t      cond;

  ovf_detect #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL detect N=%0d %s: ax=%0d ay=%0d x2=%0d y2=%0d", N, what, alpha_x, alpha_y, x2, y2);
    end
  endtask

  initial begin
    wide_t ax, ay, ee, rr, el;
    bit    b, ov, c1, c2, c3;
    checks = 0; failures = 0; n_msb = 0; n_all_ones = 0; n_ones_beta = 0; n_none = 0;
    done = 1'b0;
    alpha_x = '0; alpha_y = '0; x2 = '0; y2 = '0;
    for (int unsigned i = 0; i < NRAND; i++) begin
      ax = {$urandom, $urandom, $urandom, $urandom} % K;
      if (i % 2 == 0) begin
        // steer E onto 2^{4N}-3 .. 2^{4N}
        ee = P - 3 + wide_t'($urandom % 4);
        if (ax > ee) ax = ee;
        ay = ee - ax;
        if (ay >= K) begin ay = K - 1; ax = ee - ay; end
      end else begin
        ay = {$urandom, $urandom, $urandom, $urandom} % K;
      end
      alpha_x = (4*N)'(ax); alpha_y = (4*N)'(ay);
      x2 = N'($urandom); y2 = N'($urandom);
      #1;
      ee = ax + ay;
      rr = wide_t'(x2) + wide_t'(y2);
      b  = (rr >= M2);
      ov = ((ee << N) + rr) >= M;
      el = ee % P;
      c1 = (ee >= P);
      c2 = (el == P - 1);
      c3 = (el >= P - 2) && b;
      chk(wide_t'(e) == ee, "E");
      chk(wide_t'(r) == rr, "R");
      chk(beta == b, "beta");
      chk(overflow == ov, "overflow");
      chk(cond.msb == c1 && cond.all_ones == c2 && cond.ones_beta == c3, "conditions");
      if (c1 && !c2 && !c3) n_msb++;
      if (c2 && !c1 && !c3) n_all_ones++;
      if (c3 && !c1 && !c2) n_ones_beta++;
      if (!ov) n_none++;
    end
    done = 1'b1;
  end
endmodule
