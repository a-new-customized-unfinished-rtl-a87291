// mbe_encoder: radix-4 modified Booth encoder for one multiplier group.
//
// The multiplier B is cut into overlapping 3-bit groups
// (b[2k+1], b[2k], b[2k-1]) with b[-1] = 0. Each group selects a Booth digit
// in {-2,-1,0,+1,+2} following the usual modified Booth table:
//   000 -> 0, 001 -> +A, 010 -> +A, 011 -> +2A,
//   100 -> -2A, 101 -> -A, 110 -> -A, 111 -> 0.
// The outputs are the three select lines of rbm_pkg::booth_t. Group 111 is
// encoded as a plain zero (neg low), so that neg is set exactly for the
// groups 100, 101 and 110; the error-correcting word of the RB partial
// product generator relies on this.
// The table is the standard modified Booth scheme the design is built on;
// the neg/one/two select coding is this design's choice.
//
// Interface: grp = {b[2k+1], b[2k], b[2k-1]}; code = {neg, one, two}.
// Timing: purely combinational, two gate levels.
module mbe_encoder
  import rbm_pkg::*;
(
  input  logic [2:0] grp,
  output booth_t     code
);

  always_comb begin
    code.one = grp[1] ^ grp[0];
    code.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    code.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
