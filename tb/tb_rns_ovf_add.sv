// tb_rns_ovf_add: end-to-end test of the RNS adder's overflow detection and
// correction at the default size n = 2, moduli {15, 4, 17}, M = 1020.
// Every pair (X, Y) in [0, M-1]^2 is fed as residues, so every reachable
// case is covered, and the worked example X = 825, Y = 500 is checked value
// by value (alpha_x = 206, alpha_y = 125, E = 331 = 101001011b, R = 1,
// beta = 0, overflow). Expected values come from integer arithmetic on X
// and Y: alpha = floor(value / 4), Z = X + Y, overflow = (Z >= M).
// It counts each mechanism: the three overflow conditions firing alone,
// sums without overflow, beta = 1, and both inputs of MUX 1 in the two
// converters, and fails if one never happened. The top is used with its
// default parameters. Clocked watchdog.
module tb_rns_ovf_add
  import rns_ovf_pkg::*;
;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned N   = 2;
  localparam int unsigned M1  = (1 << (2*N)) - 1;
  localparam int unsigned M2  = 1 << N;
  localparam int unsigned M3  = (1 << (2*N)) + 1;
  localparam int unsigned K   = (1 << (4*N)) - 1;
  localparam int unsigned M   = M2 * K;
  localparam int unsigned P   = 1 << (4*N);

  logic [2*N-1:0] x1, y1;
  logic [N-1:0]   x2, y2;
  logic [2*N:0]   x3, y3;
  logic [4*N-1:0] alpha_x, alpha_y;
  logic [4*N:0]   e;
  logic [N:0]     r;
  logic           beta, overflow;
  ovf_cond_t      cond;
  logic [5*N:0]   z;

  rns_ovf_add dut (.*);

  int checks = 0, failures = 0;
  int n_msb = 0, n_all = 0, n_ob = 0, n_none = 0, n_beta = 0;
  int n_selx1 = 0, n_selx0 = 0, n_sely1 = 0, n_sely0 = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic apply(input int unsigned xv, input int unsigned yv);
    x1 = (2*N)'(xv % M1); x2 = N'(xv % M2); x3 = (2*N+1)'(xv % M3);
    y1 = (2*N)'(yv % M1); y2 = N'(yv % M2); y3 = (2*N+1)'(yv % M3);
    #1;
  endtask

  task automatic check_pair(input int unsigned xv, input int unsigned yv);
    int unsigned ee, rr, el, zz;
    bit ov, b, c1, c2, c3;
    apply(xv, yv);
    ee = (xv >> N) + (yv >> N);
    rr = (xv % M2) + (yv % M2);
    zz = xv + yv;
    ov = (zz >= M);
    b  = (rr >= M2);
    el = ee % P;
    c1 = (ee >= P); c2 = (el == P - 1); c3 = (el >= P - 2) && b;
    chk(alpha_x == (4*N)'(xv >> N) && alpha_y == (4*N)'(yv >> N),
        $sformatf("alpha X=%0d Y=%0d: %0d %0d", xv, yv, alpha_x, alpha_y));
    chk(e == (4*N+1)'(ee) && r == (N+1)'(rr) && beta == b,
        $sformatf("E/R/beta X=%0d Y=%0d", xv, yv));
    chk(overflow == ov && cond == ovf_cond_t'({c1, c2, c3}),
        $sformatf("overflow X=%0d Y=%0d: got %0d exp %0d", xv, yv, overflow, ov));
    chk(z == (5*N+1)'(zz), $sformatf("Z X=%0d Y=%0d: got %0d exp %0d", xv, yv, z, zz));
    if (c1 && !c2 && !c3) n_msb++;
    if (c2 && !c1 && !c3) n_all++;
    if (c3 && !c1 && !c2) n_ob++;
    if (!ov) n_none++;
    if (b) n_beta++;
    if (dut.u_prc_x.sel) n_selx1++; else n_selx0++;
    if (dut.u_prc_y.sel) n_sely1++; else n_sely0++;
  endtask

  task automatic need(input int count, input string what);
    $display("%-34s %0d", what, count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    // worked example
    apply(825, 500);
    chk(alpha_x == 206 && alpha_y == 125, "example alpha");
    chk(e == 9'b101001011 && r == 1 && beta == 1'b0, "example E, R, beta");
    chk(overflow && cond.msb, "example overflow by E[4n]");
    chk(z == 1325, "example Z");
    for (int unsigned xv = 0; xv < M; xv++)
      for (int unsigned yv = 0; yv < M; yv++)
        check_pair(xv, yv);
    need(n_msb,  "overflow by (i) E[4n] alone");
    need(n_all,  "overflow by (ii) all ones alone");
    need(n_ob,   "overflow by (iii) ones and beta alone");
    need(n_none, "sums without overflow");
    need(n_beta, "beta = 1");
    need(n_selx1, "converter X: MUX 1 took CPA 2");
    need(n_selx0, "converter X: MUX 1 took CPA 1");
    need(n_sely1, "converter Y: MUX 1 took CPA 2");
    need(n_sely0, "converter Y: MUX 1 took CPA 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
