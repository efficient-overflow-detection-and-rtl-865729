// ovf_detect: overflow detection unit of RNS addition Z = X + Y.
//
// Inputs are alpha_x, alpha_y (4n bits, from the two partial reverse
// converters) and x2, y2 (the modulo-2^n residues, n bits). Then
//   E    = alpha_x + alpha_y   ((4n+1)-bit CPA 3)
//   R    = x2 + y2             ((n+1)-bit CPA 4)
//   beta = MSB(R)              (MUX 2: selects constant 0 or 1 by R[n])
// and X + Y = 2^n E + R. The sum leaves the range [0, M-1],
// M = 2^n (2^{4n}-1), exactly when one of these holds:
//   (i)   E[4n] = 1,
//   (ii)  E[4n-1:0] is all ones,
//   (iii) E[4n-1:1] is all ones and beta = 1.
// The flags are returned separately in cond and ORed into overflow.
// Combinational; delay about 4n+1 full-adder delays (CPA 3, in parallel with
// CPA 4) plus the AND tree. The adders, MUX 2 and the three conditions follow
// the published method; bringing the conditions out separately does not. The
// unused carry outs of CPA 3 and CPA 4 are always 0 because the adders are
// one bit wider than their operands.
module ovf_detect
  import rns_ovf_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic [4*N-1:0] alpha_x,
  input  logic [4*N-1:0] alpha_y,
  input  logic [N-1:0]   x2,
  input  logic [N-1:0]   y2,
  output logic [4*N:0]   e,
  output logic [N:0]     r,
  output logic           beta,
  output ovf_cond_t      cond,
  output logic           overflow
);

  logic cout3, cout4;

  rca #(.W(4*N+1)) u_cpa3 (
    .a({1'b0, alpha_x}), .b({1'b0, alpha_y}), .cin(1'b0), .s(e), .cout(cout3)
  );
  rca #(.W(N+1)) u_cpa4 (
    .a({1'b0, x2}), .b({1'b0, y2}), .cin(1'b0), .s(r), .cout(cout4)
  );

  always_comb begin
    beta           = r[N] ? 1'b1 : 1'b0;
    cond.msb       = e[4*N];
    cond.all_ones  = &e[4*N-1:0];
    cond.ones_beta = (&e[4*N-1:1]) & beta;
    overflow       = cond.msb | cond.all_ones | cond.ones_beta;
  end

endmodule
