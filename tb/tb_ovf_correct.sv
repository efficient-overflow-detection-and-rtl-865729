// tb_ovf_correct: self-checking test of the correction unit at n = 2
// (exhaustive over every reachable E, 0 .. 2^9-4, and R, 0 .. 2^3-2) and
// n = 13 (random reachable E and R, plus both maxima). E is the sum of two
// alpha values below 2^{4n}-1 and R the sum of two n-bit residues, so
// nothing larger reaches the unit. Z must equal 2^n E + R. Clocked watchdog.
module tb_ovf_correct;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [8:0]  e2;
  logic [2:0]  r2;
  logic [10:0] z2;
  logic [52:0] e13;
  logic [13:0] r13;
  logic [65:0] z13;

  ovf_correct #(.N(2))  u2  (.e(e2),  .r(r2),  .z(z2));
  ovf_correct #(.N(13)) u13 (.e(e13), .r(r13), .z(z13));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [127:0] exp;
    for (int i = 0; i <= 508; i++)
      for (int j = 0; j <= 6; j++) begin
        e2 = 9'(i); r2 = 3'(j);
        #1;
        chk(128'(z2) == 128'(i) * 4 + 128'(j), $sformatf("n=2 E=%0d R=%0d Z=%0d", i, j, z2));
      end
    for (int i = 0; i < 20000; i++) begin
      e13 = 53'({$urandom, $urandom} % ((64'd1 << 53) - 3));
      r13 = 14'($urandom % ((1 << 14) - 1));
      if (i == 0) begin e13 = (53'd1 << 53) - 53'd4; r13 = (14'd1 << 14) - 14'd2; end
      #1;
      exp = (128'(e13) << 13) + 128'(r13);
      chk(128'(z13) == exp, $sformatf("n=13 E=%0h R=%0h", e13, r13));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
