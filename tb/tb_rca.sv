// tb_rca: self-checking test of the ripple-carry adder. An 8-bit instance is
// checked exhaustively over a, b and cin (131072 cases); a 66-bit instance
// (the width of CPA 5 at n = 13) is checked on random operands, including
// the all-ones operands that make the carry ripple through every bit.
// The reference is the language's own addition. Clocked watchdog.
module tb_rca;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [65:0] a66, b66, s66;
  logic        ci66, co66;

  rca #(.W(8))  u8  (.a(a8),  .b(b8),  .cin(ci8),  .s(s8),  .cout(co8));
  rca #(.W(66)) u66 (.a(a66), .b(b66), .cin(ci66), .s(s66), .cout(co66));

  initial begin
    logic [8:0]  exp8;
    logic [66:0] exp66;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); ci8 = 1'(c);
          #1;
          exp8 = 9'(i) + 9'(j) + 9'(c);
          checks++;
          if ({co8, s8} != exp8) begin
            failures++;
            if (failures < 10) $display("FAIL rca8 %0d+%0d+%0d got %0d", i, j, c, {co8, s8});
          end
        end
    for (int i = 0; i < 20000; i++) begin
      a66 = {$urandom, $urandom, $urandom};
      b66 = {$urandom, $urandom, $urandom};
      ci66 = 1'($urandom);
      if (i == 0) begin a66 = '1; b66 = 66'd0; ci66 = 1'b1; end
      if (i == 1) begin a66 = '1; b66 = '1;    ci66 = 1'b1; end
      #1;
      exp66 = 67'(a66) + 67'(b66) + 67'(ci66);
      checks++;
      if ({co66, s66} != exp66) begin
        failures++;
        if (failures < 10) $display("FAIL rca66 %h+%h+%0d", a66, b66, ci66);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
