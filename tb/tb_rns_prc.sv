// tb_rns_prc: self-checking test of the partial reverse converter. n = 2 and
// n = 3 are checked over their whole dynamic range (1020 and 32760 values),
// n = 8 and n = 13 on random values. alpha must be floor(X / 2^n). It also
// requires that MUX 1 took each of its two inputs at least once. Clocked
// watchdog.
module tb_rns_prc;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c[4], f[4], s1[4], s0[4];
  logic d[4];

  prc_harness #(.N(2),  .EXHAUST(1'b1)) h2  (.checks(c[0]), .failures(f[0]), .sel1_count(s1[0]), .sel0_count(s0[0]), .done(d[0]));
  prc_harness #(.N(3),  .EXHAUST(1'b1)) h3  (.checks(c[1]), .failures(f[1]), .sel1_count(s1[1]), .sel0_count(s0[1]), .done(d[1]));
  prc_harness #(.N(8),  .EXHAUST(1'b0), .NRAND(20000)) h8  (.checks(c[2]), .failures(f[2]), .sel1_count(s1[2]), .sel0_count(s0[2]), .done(d[2]));
  prc_harness #(.N(13), .EXHAUST(1'b0), .NRAND(20000)) h13 (.checks(c[3]), .failures(f[3]), .sel1_count(s1[3]), .sel0_count(s0[3]), .done(d[3]));

  int checks, failures;

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i] + 2; failures += f[i];
      if (s1[i] == 0) begin failures++; $display("FAIL: MUX 1 never took CPA 2 (size %0d)", i); end
      if (s0[i] == 0) begin failures++; $display("FAIL: MUX 1 never took CPA 1 (size %0d)", i); end
      $display("size %0d: MUX1 CPA2 %0d times, CPA1 %0d times", i, s1[i], s0[i]);
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
