// ovf_correct: correction unit, the exact binary sum Z = 2^n E + R.
//
// E = alpha_x + alpha_y (4n+1 bits) and R = x2 + y2 (n+1 bits) come from the
// overflow detection unit. tau = 2^n E is E followed by n zero bits; a
// (5n+1)-bit ripple CPA 5 adds R to it. Z is X + Y in plain binary whether or
// not the sum overflowed the RNS range [0, M-1], so an overflowed sum is
// still delivered correctly, in a range widened beyond M. Z < 2^{5n+1}
// always, so the carry out of CPA 5 is always 0 and is left unused.
// Combinational; delay 5n+1 full-adder delays. Structure and widths follow
// the published correction unit; the ripple form of CPA 5 is this design's.
module ovf_correct #(
  parameter int unsigned N = 2
) (
  input  logic [4*N:0]   e,
  input  logic [N:0]     r,
  output logic [5*N:0]   z
);

  logic [5*N:0] tau, r_ext;
  logic         cout5;

  always_comb begin
    tau   = {e, {N{1'b0}}};
    r_ext = {{(4*N){1'b0}}, r};
  end

  rca #(.W(5*N+1)) u_cpa5 (.a(tau), .b(r_ext), .cin(1'b0), .s(z), .cout(cout5));

endmodule
