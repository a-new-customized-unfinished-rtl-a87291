// rbmppg: RBMPPG-2, the modified RB partial product generator.
//
// For an N x N two's complement product (N a power of two, N >= 8) the
// multiplier B is radix-4 Booth recoded into N/2 NB rows, and every two
// adjacent NB rows form one RB row (rbbe2_row), giving R = N/4 RB rows.
// Row r sits at column 4r of the 2N-column product and covers columns
// 4r..4r+N+2. Each row r also produces a 4-digit error-correcting word
// (ECW) for its columns 4r..4r+3. The conventional generator adds all
// ECWs as one extra row (R+1 rows); here
//   * the ECW of row r (r < R-1) is written into row r+1 at columns
//     4r..4r+3, which row r+1 does not otherwise use, and
//   * the ECW of the last row is folded by ecw_merge into the top digits
//     of row 0 and the lowest negative bits of the last row,
// so exactly R rows leave the generator and one accumulation stage is
// saved. The sum of the R rows (digit value p - n, weight 2^column) equals
// A*B modulo 2^(2N).
//
// Interface: a, b (N-bit two's complement), pp[r] = row r as 2N RB
// digits, zero outside the row's columns. Timing: purely combinational;
// the path is Booth encode, select/invert, and for the merged digits one
// small extra function (ecw_merge).
module rbmppg
  import rbm_pkg::*;
#(
  parameter int N = 32
) (
  input  logic      [N-1:0]                  a,
  input  logic      [N-1:0]                  b,
  output rb_digit_t [N/4-1:0][2*N-1:0]       pp
);

  localparam int R = N / 4;

  if (N < 8 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("rbmppg: N must be a power of two, at least 8");
  end

  logic      [N:0]           bext;  // bext[i+1] = b[i], bext[0] = b[-1] = 0
  rb_digit_t [R-1:0][N+2:0]  row;
  rb_digit_t [R-1:0][3:0]    ecw;

  logic [1:0] q_first_p;
  logic       q_first_n;
  logic [3:0] q_last_n;

  assign bext = {b, 1'b0};

  for (genvar r = 0; r < R; r++) begin : g_row
    rbbe2_row #(.N(N)) u_row (
      .a   (a),
      .grp5(bext[4*r+4 : 4*r]),
      .row (row[r]),
      .ecw (ecw[r])
    );
  end

  ecw_merge u_merge (
    .first_p  ({row[0][N+1].p, row[0][N].p}),
    .first_n  (row[0][N+2].n),
    .last_n   ({row[R-1][3].n, row[R-1][2].n, row[R-1][1].n, row[R-1][0].n}),
    .ecw      (ecw[R-1]),
    .q_first_p(q_first_p),
    .q_first_n(q_first_n),
    .q_last_n (q_last_n)
  );

  always_comb begin
    pp = '0;
    for (int r = 0; r < R; r++) begin
      pp[r][4*r +: N+3] = row[r];
      if (r > 0) begin
        pp[r][4*r-4 +: 4] = ecw[r-1];
      end
    end
    // Last ECW folded into the first and last rows.
    pp[0][N].p   = q_first_p[0];
    pp[0][N+1].p = q_first_p[1];
    pp[0][N+2].n = q_first_n;
    for (int j = 0; j < 4; j++) begin
      pp[R-1][N-4+j].n = q_last_n[j];
    end
  end

endmodule
