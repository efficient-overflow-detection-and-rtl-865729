// rns_ovf_pkg: types shared by the RNS addition overflow detector.
//
// ovf_cond_t carries the three overflow conditions that the detection unit
// evaluates on E = alpha_x + alpha_y (a (4n+1)-bit word) and beta = MSB(R):
//   msb        : E[4n] = 1                      (E >= 2^{4n})
//   all_ones   : E[4n-1:0] all ones             (E  = 2^{4n}-1 when E[4n] = 0)
//   ones_beta  : E[4n-1:1] all ones and beta=1  (E >= 2^{4n}-2 and R >= 2^n)
// The overflow flag is the OR of the three. The struct itself is this
// design's packaging of the three conditions; the conditions follow the
// algorithm's step 4.
package rns_ovf_pkg;

  typedef struct packed {
    logic msb;
    logic all_ones;
    logic ones_beta;
  } ovf_cond_t;

endpackage
