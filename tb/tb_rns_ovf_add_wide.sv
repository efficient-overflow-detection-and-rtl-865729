// tb_rns_ovf_add_wide: end-to-end test of the RNS overflow adder at n = 3, 8
// and 13 (up to the largest n of the cost table), random and near-overflow
// operand pairs in each. At n = 3 it also checks the worked example
// X = 7280, Y = 16370 (moduli {63, 8, 65}, M = 32760): no overflow and
// Z = 23650. It fails if any overflow condition never fired alone at any
// size. Clocked watchdog.
module tb_rns_ovf_add_wide
  import rns_ovf_pkg::*;
;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c[3], f[3], a[3], b[3], g[3], n0[3];
  logic d[3];
  int checks, failures;

  top_harness #(.N(3),  .NRAND(40000)) h3  (.checks(c[0]), .failures(f[0]), .n_msb(a[0]), .n_all_ones(b[0]), .n_ones_beta(g[0]), .n_none(n0[0]), .done(d[0]));
  top_harness #(.N(8),  .NRAND(40000)) h8  (.checks(c[1]), .failures(f[1]), .n_msb(a[1]), .n_all_ones(b[1]), .n_ones_beta(g[1]), .n_none(n0[1]), .done(d[1]));
  top_harness #(.N(13), .NRAND(40000)) h13 (.checks(c[2]), .failures(f[2]), .n_msb(a[2]), .n_all_ones(b[2]), .n_ones_beta(g[2]), .n_none(n0[2]), .done(d[2]));

  // worked example at n = 3 on a separate instance
  logic [5:0]  ex1, ey1;
  logic [2:0]  ex2, ey2;
  logic [6:0]  ex3, ey3;
  logic [11:0] eax, eay;
  logic [12:0] ee;
  logic [3:0]  er;
  logic        ebeta, eovf;
  ovf_cond_t   econd;
  logic [15:0] ez;

  rns_ovf_add #(.N(3)) u_ex (
    .x1(ex1), .x2(ex2), .x3(ex3), .y1(ey1), .y2(ey2), .y3(ey3),
    .alpha_x(eax), .alpha_y(eay), .e(ee), .r(er), .beta(ebeta),
    .cond(econd), .overflow(eovf), .z(ez)
  );

  initial begin
    int ex_checks, ex_fail;
    ex_checks = 0; ex_fail = 0;
    ex1 = 6'(7280 % 63); ex2 = 3'(7280 % 8); ex3 = 7'(7280 % 65);
    ey1 = 6'(16370 % 63); ey2 = 3'(16370 % 8); ey3 = 7'(16370 % 65);
    #1;
    ex_checks += 3;
    if (eax != 12'(7280 / 8) || eay != 12'(16370 / 8)) begin ex_fail++; $display("FAIL example alpha"); end
    if (eovf) begin ex_fail++; $display("FAIL example flagged overflow"); end
    if (ez != 16'd23650) begin ex_fail++; $display("FAIL example Z=%0d", ez); end
    wait (d[0] && d[1] && d[2]);
    checks = ex_checks; failures = ex_fail;
    for (int i = 0; i < 3; i++) begin
      $display("harness %0d: (i) %0d, (ii) %0d, (iii) %0d, no overflow %0d", i, a[i], b[i], g[i], n0[i]);
      checks += c[i] + 4; failures += f[i];
      if (a[i] == 0)  begin failures++; $display("FAIL: (i) never fired alone"); end
      if (b[i] == 0)  begin failures++; $display("FAIL: (ii) never fired alone"); end
      if (g[i] == 0)  begin failures++; $display("FAIL: (iii) never fired alone"); end
      if (n0[i] == 0) begin failures++; $display("FAIL: no sum without overflow"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end
endmodule
