// tb_ovf_detect: self-checking test of the overflow detection unit at n = 2
// and n = 13. Beyond value checks it requires that each overflow condition
// was seen firing on its own, and that non-overflowing sums were seen too.
// Clocked watchdog.
module tb_ovf_detect;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c[2], f[2], a[2], b[2], g[2], z[2];
  logic d[2];
  int checks, failures;

  detect_harness #(.N(2),  .NRAND(20000)) h2  (.checks(c[0]), .failures(f[0]), .n_msb(a[0]), .n_all_ones(b[0]), .n_ones_beta(g[0]), .n_none(z[0]), .done(d[0]));
  detect_harness #(.N(13), .NRAND(20000)) h13 (.checks(c[1]), .failures(f[1]), .n_msb(a[1]), .n_all_ones(b[1]), .n_ones_beta(g[1]), .n_none(z[1]), .done(d[1]));

  initial begin
    wait (d[0] && d[1]);
    checks = 0; failures = 0;
    for (int i = 0; i < 2; i++) begin
      $display("harness %0d: (i) alone %0d, (ii) alone %0d, (iii) alone %0d, no overflow %0d",
               i, a[i], b[i], g[i], z[i]);
      checks += c[i] + 4; failures += f[i];
      if (a[i] == 0) begin failures++; $display("FAIL: condition (i) never fired alone"); end
      if (b[i] == 0) begin failures++; $display("FAIL: condition (ii) never fired alone"); end
      if (g[i] == 0) begin failures++; $display("FAIL: condition (iii) never fired alone"); end
      if (z[i] == 0) begin failures++; $display("FAIL: no non-overflowing case"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end
endmodule
