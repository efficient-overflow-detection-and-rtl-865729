// top_harness: drives one rns_ovf_add instance of size N with NRAND operand
// pairs and checks every output against integer arithmetic on X and Y. Half
// of the pairs are steered so that X + Y falls within 2^{N+1} of M, where
// the overflow conditions (ii) and (iii) separate from (i) and from no
// overflow. Counts of each mechanism are returned to the testbench.
module top_harness
  import rns_ovf_pkg::*;
#(
  parameter int unsigned N     = 3,
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
  localparam wide_t M1  = (ONE << (2*N)) - 1;
  localparam wide_t M2  = ONE << N;
  localparam wide_t M3  = (ONE << (2*N)) + 1;
  localparam wide_t M   = M2 * K;

  logic [2*N-1:0] x1, y1;
  logic [N-1:0]   x2, y2;
  logic [2*N:0]   x3, y3;
  logic [4*N-1:0] alpha_x, alpha_y;
  logic [4*N:0]   e;
  logic [N:0]     r;
  logic           beta, overflow;
  ovf_cond_t      cond;
  logic [5*N:0]   z;

  rns_ovf_add #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL top N=%0d %s", N, what);
    end
  endtask

  function automatic wide_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check_pair(input wide_t xv, input wide_t yv);
    wide_t ee, rr, el, zz;
    bit ov, b, c1, c2, c3;
    x1 = (2*N)'(xv % M1); x2 = N'(xv % M2); x3 = (2*N+1)'(xv % M3);
    y1 = (2*N)'(yv % M1); y2 = N'(yv % M2); y3 = (2*N+1)'(yv % M3);
    #1;
    ee = (xv >> N) + (yv >> N);
    rr = (xv % M2) + (yv % M2);
    zz = xv + yv;
    ov = (zz >= M);
    b  = (rr >= M2);
    el = ee % P;
    c1 = (ee >= P); c2 = (el == P - 1); c3 = (el >= P - 2) && b;
    chk(wide_t'(alpha_x) == (xv >> N) && wide_t'(alpha_y) == (yv >> N), $sformatf("alpha X=%0d Y=%0d", xv, yv));
    chk(wide_t'(e) == ee && wide_t'(r) == rr && beta == b, $sformatf("E/R/beta X=%0d Y=%0d", xv, yv));
    chk(overflow == ov && cond == ovf_cond_t'({c1, c2, c3}), $sformatf("overflow X=%0d Y=%0d", xv, yv));
    chk(wide_t'(z) == zz, $sformatf("Z X=%0d Y=%0d", xv, yv));
    if (c1 && !c2 && !c3) n_msb++;
    if (c2 && !c1 && !c3) n_all_ones++;
    if (c3 && !c1 && !c2) n_ones_beta++;
    if (!ov) n_none++;
  endtask

  initial begin
    wide_t xv, yv, target;
    checks = 0; failures = 0; n_msb = 0; n_all_ones = 0; n_ones_beta = 0; n_none = 0;
    done = 1'b0;
    check_pair(0, 0);
    check_pair(M - 1, M - 1);
    check_pair(M - 1, 1);
    check_pair(M - 1, 0);
    for (int unsigned i = 0; i < NRAND; i++) begin
      xv = rnd() % M;
      if (i % 2 == 0) begin
        target = M - (ONE << (N + 1)) + (rnd() % (ONE << (N + 2)));
        if (xv > target) xv = target;
        yv = target - xv;
        if (yv >= M) begin yv = M - 1; xv = target - yv; end
      end else begin
        yv = rnd() % M;
      end
      check_pair(xv, yv);
    end
    done = 1'b1;
  end
endmodule
