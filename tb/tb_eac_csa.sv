// tb_eac_csa: self-checking test of the end-around-carry carry-save adder.
// An 8-bit instance (CSA width at n = 2) runs on random operands and a
// 52-bit instance (n = 13) too. For each, the sum word must be the bitwise
// XOR, the carry word the majority rotated left by one, and
// s + co must equal a + b + c modulo 2^W - 1. Clocked watchdog.
module tb_eac_csa;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, c8, s8, co8;
  logic [51:0] a52, b52, c52, s52, co52;

  eac_csa #(.W(8))  u8  (.a(a8),  .b(b8),  .c(c8),  .s(s8),  .co(co8));
  eac_csa #(.W(52)) u52 (.a(a52), .b(b52), .c(c52), .s(s52), .co(co52));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [127:0] k8, k52;
    k8  = (128'd1 << 8) - 1;
    k52 = (128'd1 << 52) - 1;
    for (int i = 0; i < 20000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8 = 8'($urandom);
      a52 = {$urandom, $urandom}; b52 = {$urandom, $urandom}; c52 = {$urandom, $urandom};
      if (i == 0) begin a8 = '1; b8 = '1; c8 = '1; a52 = '1; b52 = '1; c52 = '1; end
      if (i == 1) begin a8 = 8'h80; b8 = 8'h80; c8 = 0; a52 = 52'h8000000000000; b52 = a52; c52 = 0; end
      #1;
      chk(s8 == (a8 ^ b8 ^ c8), "csa8 sum word");
      chk(((128'(s8) + 128'(co8)) % k8) == ((128'(a8) + 128'(b8) + 128'(c8)) % k8), "csa8 mod sum");
      chk(co8 == {(a8[6:0] & b8[6:0]) | (a8[6:0] & c8[6:0]) | (b8[6:0] & c8[6:0]),
                  (a8[7] & b8[7]) | (a8[7] & c8[7]) | (b8[7] & c8[7])}, "csa8 carry word");
      chk(s52 == (a52 ^ b52 ^ c52), "csa52 sum word");
      chk(((128'(s52) + 128'(co52)) % k52) == ((128'(a52) + 128'(b52) + 128'(c52)) % k52), "csa52 mod sum");
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
