// tb_rns_oppr: self-checking test of the operand preparation at n = 2, 3, 8
// and 13 (the smallest and largest n of the cost table and two between).
// Each size runs in its own oppr_harness; the testbench waits for all,
// sums their counts and prints the TB_RESULT line. A clocked watchdog ends
// the run with a failure if the harnesses hang.
module tb_rns_oppr;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c2, f2, c3, f3, c8, f8, c13, f13;
  logic d2, d3, d8, d13;

  oppr_harness #(.N(2),  .NRAND(3000)) h2  (.checks(c2),  .failures(f2),  .done(d2));
  oppr_harness #(.N(3),  .NRAND(3000)) h3  (.checks(c3),  .failures(f3),  .done(d3));
  oppr_harness #(.N(8),  .NRAND(3000)) h8  (.checks(c8),  .failures(f8),  .done(d8));
  oppr_harness #(.N(13), .NRAND(3000)) h13 (.checks(c13), .failures(f13), .done(d13));

  initial begin
    wait (d2 && d3 && d8 && d13);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c8 + c13, f2 + f3 + f8 + f13);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c8 + c13, f2 + f3 + f8 + f13 + 1);
    $finish;
  end
endmodule
