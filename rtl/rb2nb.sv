// rb2nb: RB to normal binary converter.
//
// Turns a W-digit RB number (X+, X-) into its W-bit two's complement value
// X+ - X- = X+ + ~X- + 1 (mod 2^W). The subtraction uses a hybrid
// parallel-prefix / carry-select adder: the word is cut into blocks of BS
// bits; every block computes its sum twice, for carry-in 0 and 1, and its
// block generate/propagate; a Kogge-Stone prefix tree over the blocks
// (with the constant carry-in 1 entering at block 0) yields every block's
// carry-in, which then selects one of the two precomputed sums. The
// original design names this adder type for the converter; block size and prefix
// network are this design's choice.
//
// Interface: d (W RB digits), y (W bits). Timing: combinational, about
// BS + log2(W/BS) + 1 gate levels of carry logic.
module rb2nb
  import rbm_pkg::*;
#(
  parameter int W  = 64,
  parameter int BS = 4
) (
  input  rb_digit_t [W-1:0] d,
  output logic      [W-1:0] y
);

  localparam int NB = (W + BS - 1) / BS;
  localparam int LV = (NB > 1) ? $clog2(NB) : 1;
  localparam int WP = NB * BS;

  logic [WP-1:0] xa, xb;  // addends X+ and ~X-, zero-padded to WP bits
  logic [NB-1:0][BS-1:0] sum0, sum1;
  logic [LV:0][NB-1:0] g, p;
  logic [NB-1:0] cin;     // cin[k] = carry into block k
  logic [WP-1:0] yp;

  always_comb begin
    xa = '0;
    xb = '0;
    for (int i = 0; i < W; i++) begin
      xa[i] = d[i].p;
      xb[i] = ~d[i].n;
    end
  end

  // Block sums for both carry-ins, block generate and propagate.
  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [BS:0] s0;
    assign s0 = {1'b0, xa[k*BS +: BS]} + {1'b0, xb[k*BS +: BS]};
    assign sum0[k] = s0[BS-1:0];
    assign sum1[k] = xa[k*BS +: BS] + xb[k*BS +: BS] + BS'(1);
    assign g[0][k] = s0[BS];
    assign p[0][k] = &(xa[k*BS +: BS] ^ xb[k*BS +: BS]);
  end

  // Kogge-Stone prefix over the blocks.
  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar k = 0; k < NB; k++) begin : g_node
      if (k >= (1 << l)) begin : g_op
        assign g[l+1][k] = g[l][k] | (p[l][k] & g[l][k-(1<<l)]);
        assign p[l+1][k] = p[l][k] & p[l][k-(1<<l)];
      end else begin : g_pass
        assign g[l+1][k] = g[l][k];
        assign p[l+1][k] = p[l][k];
      end
    end
  end

  // The converter's +1 enters as the carry into block 0.
  assign cin[0] = 1'b1;
  for (genvar k = 0; k < NB; k++) begin : g_sel
    if (k > 0) begin : g_c
      assign cin[k] = g[LV][k-1] | p[LV][k-1];
    end
    assign yp[k*BS +: BS] = cin[k] ? sum1[k] : sum0[k];
  end

  assign y = yp[W-1:0];

endmodule
