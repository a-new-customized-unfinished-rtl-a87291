// rb_multiplier: N x N two's complement redundant binary multiplier.
//
// The product is formed in three steps, each a block of its own:
//   1. rbmppg - radix-4 Booth recoding of b and the RBMPPG-2 RB partial
//      product generator: N/4 RB rows, with every error-correcting word
//      absorbed into the rows (no extra correction row);
//   2. rbpp_tree - log2(N/4) stages of carry-free RB adders;
//   3. rb2nb - conversion of the RB sum to two's complement with a hybrid
//      parallel-prefix / carry-select adder.
// With the default N = 32 this is eight RBBE-2 row generators, three RB
// accumulation stages and a 64-bit converter.
// The three-step structure and the default size follow the RB multiplier
// this design implements; having no pipeline registers is this design's
// choice, as nothing in the source places any.
//
// Interface: a, b (N-bit two's complement) -> p = a*b (2N bits, exact).
// Timing: purely combinational, no clock and no registers; the result is
// valid one combinational delay after the operands.
module rb_multiplier
  import rbm_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  rb_digit_t [N/4-1:0][2*N-1:0] pp;
  rb_digit_t [2*N-1:0]          rb_sum;

  rbmppg #(.N(N)) u_ppg (
    .a (a),
    .b (b),
    .pp(pp)
  );

  rbpp_tree #(.N(N)) u_tree (
    .pp (pp),
    .sum(rb_sum)
  );

  rb2nb #(.W(2 * N)) u_conv (
    .d(rb_sum),
    .y(p)
  );

endmodule
