// rns_ovf_add: overflow detection and correction for the addition of two RNS
// numbers, built on partial reverse conversion.
//
// X = (x1, x2, x3) and Y = (y1, y2, y3) are residues in the moduli set
// {2^{2n}-1, 2^n, 2^{2n}+1}, dynamic range M = 2^n (2^{4n}-1). (The method
// was published under the set {2^{2n-1}-1, 2^n, 2^n-1}, but its equations,
// widths and overflow conditions are those of this set, and this RTL
// follows them.) Each operand
// goes through its own partial reverse converter, which yields
// alpha = floor(value / 2^n) without converting the whole number. The
// detection unit adds alpha_x + alpha_y = E and x2 + y2 = R, flags overflow
// (X + Y >= M) from the top bits of E and beta = MSB(R), and the correction
// unit returns the exact sum Z = 2^n E + R in 5n+1 bits.
// Ports: the six residues in; alpha_x, alpha_y, E, R, beta, the three
// overflow conditions, the overflow flag and Z out. Fully combinational
// (no clock or reset, a choice of this design); the critical path runs
// through the converter (two CSA levels, a 4n-bit ripple CPA, MUX 1), the
// (4n+1)-bit CPA 3 and the (5n+1)-bit CPA 5. The block structure follows the
// published method. Residues must be in range (x1 <= 2^{2n}-1,
// x3 <= 2^{2n}); the all-ones x1 is accepted as a second code of zero.
module rns_ovf_add
  import rns_ovf_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic [2*N-1:0] x1,
  input  logic [N-1:0]   x2,
  input  logic [2*N:0]   x3,
  input  logic [2*N-1:0] y1,
  input  logic [N-1:0]   y2,
  input  logic [2*N:0]   y3,
  output logic [4*N-1:0] alpha_x,
  output logic [4*N-1:0] alpha_y,
  output logic [4*N:0]   e,
  output logic [N:0]     r,
  output logic           beta,
  output ovf_cond_t      cond,
  output logic           overflow,
  output logic [5*N:0]   z
);

  logic sel_x, sel_y;

  rns_prc #(.N(N)) u_prc_x (.x1(x1), .x2(x2), .x3(x3), .alpha(alpha_x), .sel(sel_x));
  rns_prc #(.N(N)) u_prc_y (.x1(y1), .x2(y2), .x3(y3), .alpha(alpha_y), .sel(sel_y));

  ovf_detect #(.N(N)) u_detect (
    .alpha_x(alpha_x), .alpha_y(alpha_y), .x2(x2), .y2(y2),
    .e(e), .r(r), .beta(beta), .cond(cond), .overflow(overflow)
  );

  ovf_correct #(.N(N)) u_correct (.e(e), .r(r), .z(z));

endmodule
