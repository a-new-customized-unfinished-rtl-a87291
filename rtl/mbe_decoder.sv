// mbe_decoder: one normal-binary (NB) Booth partial product row.
//
// From the multiplicand A (N-bit two's complement) and one Booth code it
// forms the (N+1)-bit row
//   p[j] = ((one & a[j]) | (two & a[j-1])) ^ neg,  a[-1] = 0, a[N] = a[N-1],
// i.e. A or 2A is selected and, for a negative digit, every bit is inverted.
// Read as an (N+1)-bit two's complement number, p + neg equals digit * A:
// the "+1" of the negation (the correction bit) is not added here but is
// returned on neg so that the caller can fold it into an error-correcting
// word.
// Selection and inversion follow the modified Booth scheme; leaving the
// +1 to the ECW is what the RB generator requires.
//
// Interface: a (N bits), code (rbm_pkg::booth_t) -> p (N+1 bits).
// Timing: purely combinational, one AND-OR-XOR level per bit.
module mbe_decoder
  import rbm_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  booth_t       code,
  output logic [N:0]   p
);

  logic [N:0] a1;  // A, sign-extended to N+1 bits
  logic [N:0] a2;  // 2A

  assign a1 = {a[N-1], a};
  assign a2 = {a, 1'b0};

  always_comb begin
    p = (({(N+1){code.one}} & a1) | ({(N+1){code.two}} & a2)) ^ {(N+1){code.neg}};
  end

endmodule
