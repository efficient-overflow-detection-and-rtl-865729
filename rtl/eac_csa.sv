// eac_csa: W-bit carry-save adder modulo 2^W - 1 (end-around carry).
//
// Reduces three W-bit operands a, b, c to a sum word s and a carry word co
// with s + co == a + b + c (mod 2^W - 1). Each bit is one full adder: s is the
// bitwise XOR and the majority bits form the carry word, which in ordinary
// CSA would be shifted left by one. Modulo 2^W - 1 a left shift by one is a
// one-bit circular rotation (2^W = 1), so the carry out of the top bit lands
// in bit 0 instead of being dropped or growing the word. Delay: one
// full-adder; area: W full adders. Combinational.
// The design uses it as CSA 1 and CSA 2 (W = 4n); that the CSAs are
// modulo 2^{4n} - 1 with end-around carry is this design's reading of the
// rotation-based operand preparation they follow.
module eac_csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  logic [W-1:0] maj;

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    co  = {maj[W-2:0], maj[W-1]};
  end

endmodule
