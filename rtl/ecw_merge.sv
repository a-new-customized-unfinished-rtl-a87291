// ecw_merge: removes the error-correcting word (ECW) of the last RB row.
//
// In the RBMPPG-2 generator every row's ECW moves into the empty low
// columns of the next row, which leaves the ECW of the last row with no
// row below to go to. Its four columns (N-4..N-1) lie just under the most
// significant digits of the first row (columns N..N+2), and the last row's
// negative bits there are partly free. This block adds up every digit of
// that window that depends on the ECW or may change,
//   T = 16*(first X+ at N,N+1) - 64*(first X- at N+2)
//       - (last X- at N-4..N-1) + ECW            [units of 2^(N-4)],
// and writes T back into the same slots as
//   T = 16*qa - qb - 64*qc,
// qa = new first-row X+ at columns N, N+1, qc = new first-row X- at column
// N+2, qb = new last-row X- at columns N-4..N-1. So the product needs
// N/4 RB rows instead of N/4 + 1. With the row format of rbbe2_row
// (first-row top digits sx, sx / sx; the last row's X- low two bits zero),
// T always lies in [-32, +1]; the re-encoding is
//   qc = (T < -15), U = T + 64*qc, qa = ceil(U/16), qb = 16*qa - U.
// The idea (last ECW folded into the two MSBs of the first row and the two
// LSBs of the last row, plus two "q" bits) follows the RBMPPG-2 scheme; the
// exact window, including the first row's column N+2, fits this design's
// sign handling and is its own.
//
// Interface: first_p = first-row X+ at {N+1, N}, first_n = first-row X- at
// N+2, last_n = last-row X- at {N-1..N-4}, ecw = last row's ECW digits
// (index = column - (N-4)). Outputs are the replacement bits.
// Timing: purely combinational (a 5-input function in practice).
module ecw_merge
  import rbm_pkg::*;
(
  input  logic      [1:0] first_p,
  input  logic            first_n,
  input  logic      [3:0] last_n,
  input  rb_digit_t [3:0] ecw,
  output logic      [1:0] q_first_p,
  output logic            q_first_n,
  output logic      [3:0] q_last_n
);

  logic signed [7:0] t, u, qa;

  always_comb begin
    t = 8'sd16 * $signed({6'd0, first_p})
      - 8'sd64 * $signed({7'd0, first_n})
      - $signed({4'd0, last_n})
      + 8'(rb_val(ecw[0]))
      + 8'sd2 * 8'(rb_val(ecw[1]))
      + 8'sd4 * 8'(rb_val(ecw[2]))
      + 8'sd8 * 8'(rb_val(ecw[3]));
    q_first_n = (t < -8'sd15);
    u = q_first_n ? t + 8'sd64 : t;
    qa = (u + 8'sd15) >>> 4;
    q_first_p = qa[1:0];
    q_last_n = 4'(8'sd16 * qa - u);
  end

  // The row format guarantees the window value range; anything outside it
  // means the inputs do not come from rbbe2_row rows.
  always_comb begin
    assert (t >= -8'sd32 && t <= 8'sd1)
      else $error("ecw_merge: window value %0d outside [-32,1]", t);
  end

endmodule
