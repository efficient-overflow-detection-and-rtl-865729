// rns_prc: partial reverse converter, RNS (x1, x2, x3) -> alpha.
//
// For X in [0, M-1], M = 2^n (2^{2n}-1) (2^{2n}+1) = 2^n (2^{4n}-1), the
// converter returns alpha = floor(X / 2^n), so that X = 2^n alpha + x2; the
// low n bits of X are x2 itself and need no conversion. Structure:
//   OPPR  -> psi1, psi2, psi3, psi4 (A4)
//   CSA 1 : psi1 + psi2 + psi3       -> S1, C1   (4n bits, end-around carry)
//   CSA 2 : S1 + C1 + A4             -> S2, C2   (4n bits, end-around carry)
//   CPA 1 : S2 + C2 + 0,  CPA 2 : S2 + C2 + 1    (4n-bit ripple adders)
//   MUX 1 : alpha = CPA 2 result if CPA 2 carries out, else CPA 1 result.
// The two CPAs with carry in 0 and 1 and the MUX form a modulo 2^{4n}-1
// adder. Selecting on the carry out of CPA 2 folds the end-around carry and
// also maps the all-ones word (the second code of zero) to 0, so alpha is
// always the plain binary value in [0, 2^{4n}-2]. The select signal is this
// design's choice (see the README). Combinational; delay about
// 2 + 4n full-adder delays plus a multiplexer.
module rns_prc #(
  parameter int unsigned N = 2
) (
  input  logic [2*N-1:0] x1,
  input  logic [N-1:0]   x2,
  input  logic [2*N:0]   x3,
  output logic [4*N-1:0] alpha,
  output logic           sel     // MUX 1 select: 1 = CPA 2 result taken
);

  localparam int unsigned K = 4 * N;

  logic [K-1:0] psi1, psi2, psi3, a4;
  logic [K-1:0] s1, c1, s2, c2;
  logic [K-1:0] sum0, sum1;
  logic         cout0, cout1;

  rns_oppr #(.N(N)) u_oppr (
    .x1(x1), .x2(x2), .x3(x3),
    .psi1(psi1), .psi2(psi2), .psi3(psi3), .psi4(a4)
  );

  eac_csa #(.W(K)) u_csa1 (.a(psi1), .b(psi2), .c(psi3), .s(s1), .co(c1));
  eac_csa #(.W(K)) u_csa2 (.a(s1),   .b(c1),   .c(a4),   .s(s2), .co(c2));

  // cout0 is not needed: the carry out of CPA 2 decides alone.
  rca #(.W(K)) u_cpa1 (.a(s2), .b(c2), .cin(1'b0), .s(sum0), .cout(cout0));
  rca #(.W(K)) u_cpa2 (.a(s2), .b(c2), .cin(1'b1), .s(sum1), .cout(cout1));

  always_comb begin
    sel   = cout1;
    alpha = sel ? sum1 : sum0;
  end

endmodule
