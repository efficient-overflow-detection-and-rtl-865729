// rns_oppr: operand preparation (OPPR) of the partial reverse converter.
//
// Input is one RNS number (x1, x2, x3) of the moduli set
// {2^{2n}-1, 2^n, 2^{2n}+1}: x1 has 2n bits, x2 has n bits, x3 has 2n+1 bits
// (x3 <= 2^{2n}). Output is four 4n-bit words whose sum modulo 2^{4n}-1 is
//   alpha = floor(X / 2^n) = (2^{3n-1}+2^{n-1}) x1 - 2^{3n} x2
//                            + 2^{3n-1} x3 - 2^{n-1} x3   (mod 2^{4n}-1).
// Multiplication by 2^p modulo 2^{4n}-1 is a p-bit circular left rotation and
// negation is the one's complement, so every word is wiring plus inverters:
//   psi1 = x1[n:0] , x1[2n-1:0] , x1[2n-1:n+1]   (the two shifted copies of
//          x1 do not overlap, so their sum is a concatenation)
//   psi2 = ~x2 , 1...1 (3n)
//   psi3 = x3[n:0] , 0...0 (2n-1) , x3[2n:n+1]
//   psi4 = 1...1 (n) , ~x3 , 1...1 (n-1)          (A4, goes to CSA 2)
// These bit layouts follow the published bit-level operand equations; that
// the middle field of psi4 is the complement of x3 (the negative sign) is
// spelled out here. N >= 2.
// Combinational, no clock.
module rns_oppr #(
  parameter int unsigned N = 2
) (
  input  logic [2*N-1:0] x1,
  input  logic [N-1:0]   x2,
  input  logic [2*N:0]   x3,
  output logic [4*N-1:0] psi1,
  output logic [4*N-1:0] psi2,
  output logic [4*N-1:0] psi3,
  output logic [4*N-1:0] psi4
);

  always_comb begin
    psi1 = {x1[N:0], x1, x1[2*N-1:N+1]};
    psi2 = {~x2, {(3*N){1'b1}}};
    psi3 = {x3[N:0], {(2*N-1){1'b0}}, x3[2*N:N+1]};
    psi4 = {{N{1'b1}}, ~x3, {(N-1){1'b1}}};
  end

endmodule
