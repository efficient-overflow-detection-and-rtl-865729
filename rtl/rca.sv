// rca: regular ripple-carry adder (carry-propagate adder, CPA).
//
// s = a + b + cin over W bits, cout is the carry out of bit W-1. The carry
// ripples through W full-adder cells, so the delay is W full-adder delays,
// the "regular CPA" cost model of the design (a W-bit CPA costs W full
// adders of area and W full-adder delays). It is used as CPA 1 and CPA 2
// (4n bits) in the partial reverse converter, CPA 3 (4n+1 bits) and CPA 4
// (n+1 bits) in the overflow detection unit and CPA 5 (5n+1 bits) in the
// correction unit. Purely combinational. Writing the ripple as an explicit
// full-adder chain, rather than with "+", is this design's choice.
module rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  always_comb begin
    logic c;
    c = cin;
    for (int unsigned i = 0; i < W; i++) begin
      s[i] = a[i] ^ b[i] ^ c;
      c    = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    cout = c;
  end

endmodule
