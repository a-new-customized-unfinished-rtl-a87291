// rbpp_tree: RB partial product reduction tree.
//
// Sums R RB partial product rows (2N digits each) in log2(R) stages of RB
// adders (rba). Stage 1 adds rows (0,1), (2,3), ...; every later stage
// adds neighbouring results, so R = N/4 rows from the RBMPPG-2 generator
// need log2(N/4) stages (3 for N = 32). Nodes are numbered as a heap:
// nodes 0..R-1 are the input rows and node R+k adds nodes 2k and 2k+1.
// The columns each node can occupy are worked out at elaboration time
// (row r of the generator covers 4r-4..4r+N+2; a sum covers the union of
// its operands plus one carry column, capped at 2N-1), so that each adder
// gets full adders only where both operands have digits.
// The stage count follows the RBMPPG-2 multiplier (one stage fewer than
// with a separate ECW row); the pairing order is this design's choice.
//
// Interface: pp[r] = row r (2N RB digits), sum = total (2N RB digits),
// exact modulo 2^(2N). Timing: combinational, log2(R) adder levels of
// constant depth each.
module rbpp_tree
  import rbm_pkg::*;
#(
  parameter int N = 32
) (
  input  rb_digit_t [N/4-1:0][2*N-1:0] pp,
  output rb_digit_t [2*N-1:0]          sum
);

  localparam int R = N / 4;
  localparam int W = 2 * N;

  function automatic int span_lo(int k);
    if (k < R) return (k == 0) ? 0 : 4 * k - 4;
    return span_lo(2 * (k - R));
  endfunction

  function automatic int span_hi(int k);
    int hi;
    if (k < R) return 4 * k + N + 2;
    hi = span_hi(2 * (k - R) + 1) + 1;
    return (hi > W - 1) ? W - 1 : hi;
  endfunction

  rb_digit_t [2*R-2:0][W-1:0] node;

  for (genvar r = 0; r < R; r++) begin : g_leaf
    assign node[r] = pp[r];
  end

  for (genvar k = 0; k < R - 1; k++) begin : g_add
    rba #(
      .W   (W),
      .A_LO(span_lo(2 * k)),
      .A_HI(span_hi(2 * k)),
      .B_LO(span_lo(2 * k + 1)),
      .B_HI(span_hi(2 * k + 1))
    ) u_rba (
      .a(node[2*k]),
      .b(node[2*k+1]),
      .s(node[R+k])
    );
  end

  assign sum = node[2*R-2];

endmodule
