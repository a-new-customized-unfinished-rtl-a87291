// rbbe2_row: one redundant-binary Booth (RBBE-2) partial product row.
//
// Two adjacent radix-4 Booth rows, X (weight 1) and Y (weight 4), are
// merged into one RB row by letting X drive the positive bits and the
// inverse of Y drive the negative bits. Using X + Y = X - ~Y - 1 and the
// Booth identity digit*A = P + neg, the row value relative to its own
// column 0 is
//   Px + 4*Py + negx + 4*negy = RBrow + ECW,
// where RBrow is the N+3 digit RB vector below and ECW is the 4-digit error
// correcting word "0 E 0 F" with F = +negx (column 0) and E = negy - 1
// (column 2). ECW is returned separately: the generator places it in the
// next row, in the four columns that row leaves empty.
//
// Digit layout (relative column j, X+ / X-):
//   j = 0..N-1 : x[j]          / (j >= 2 ? ~y[j-2] : 0)
//   j = N      : sx            / ~y[N-2]
//   j = N+1    : sx            / ~y[N-1]
//   j = N+2    : ~sy           / sx
// with sx = x[N], sy = y[N] the sign bits of the two NB rows. The negative
// weight of sx (-sx*2^N) is written as +sx*2^N + sx*2^(N+1) - sx*2^(N+2),
// and the sign of Y folds into ~sy at column N+2, so the row needs no
// sign-extension digits and no constant. This sign handling is this
// design's own; the merged row and the ECW follow the RBMPPG-2 scheme.
//
// Interface: a (multiplicand), grp5 = {b[4r+3], b[4r+2], b[4r+1], b[4r],
// b[4r-1]} (the two overlapping Booth groups of row r), row (N+3 RB
// digits), ecw (4 RB digits). Timing: purely combinational.
module rbbe2_row
  import rbm_pkg::*;
#(
  parameter int N = 32
) (
  input  logic      [N-1:0] a,
  input  logic      [4:0]   grp5,
  output rb_digit_t [N+2:0] row,
  output rb_digit_t [3:0]   ecw
);

  booth_t     code_x, code_y;
  logic [N:0] px, py;

  mbe_encoder u_enc_x (.grp(grp5[2:0]), .code(code_x));
  mbe_encoder u_enc_y (.grp(grp5[4:2]), .code(code_y));

  mbe_decoder #(.N(N)) u_dec_x (.a(a), .code(code_x), .p(px));
  mbe_decoder #(.N(N)) u_dec_y (.a(a), .code(code_y), .p(py));

  always_comb begin
    for (int j = 0; j < N; j++) begin
      row[j].p = px[j];
    end
    row[N].p   = px[N];
    row[N+1].p = px[N];
    row[N+2].p = ~py[N];

    row[0].n = 1'b0;
    row[1].n = 1'b0;
    for (int j = 2; j < N + 2; j++) begin
      row[j].n = ~py[j-2];
    end
    row[N+2].n = px[N];

    // ECW = 0 E 0 F, F = negx at column 0, E = negy - 1 at column 2.
    ecw[0] = '{p: code_x.neg, n: 1'b0};
    ecw[1] = RB_ZERO;
    ecw[2] = '{p: 1'b0, n: ~code_y.neg};
    ecw[3] = RB_ZERO;
  end

endmodule
