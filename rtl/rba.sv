// rba: redundant binary adder, one RBPP accumulation block.
//
// Adds two W-digit RB numbers a and b into one W-digit RB number s with a
// row of digit cells and no carry propagation: each column takes its
// carry and "both non-negative" flag from the column below only. Columns
// where both operands can hold digits use an RB full adder (rbfa); the
// others use an RB half adder (rbha) on the one operand present there (or
// on a zero digit, which just passes the carry on). The columns each
// operand can occupy are given by the parameters A_LO..A_HI and
// B_LO..B_HI, so the mix of full and half adders depends on where the
// block sits in the tree, as in the original design. The carry out of
// column W-1 is dropped: the result is exact modulo 2^W.
// The RBFA/RBHA mix follows the RB multiplier's adder blocks; describing
// it by operand column ranges is this design's choice.
//
// Interface: a, b, s: W RB digits each. Timing: combinational, constant
// depth (two cell levels) independent of W.
module rba
  import rbm_pkg::*;
#(
  parameter int W    = 64,
  parameter int A_LO = 0,
  parameter int A_HI = 63,
  parameter int B_LO = 0,
  parameter int B_HI = 63
) (
  input  rb_digit_t [W-1:0] a,
  input  rb_digit_t [W-1:0] b,
  output rb_digit_t [W-1:0] s
);

  rb_digit_t [W:0] c;  // c[i] = carry into column i
  logic      [W:0] h;  // h[i] = column i-1 had two non-negative digits

  assign c[0] = RB_ZERO;
  assign h[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_col
    localparam bit HAS_A = (i >= A_LO) && (i <= A_HI);
    localparam bit HAS_B = (i >= B_LO) && (i <= B_HI);
    if (HAS_A && HAS_B) begin : g_fa
      rbfa u_fa (
        .x(a[i]), .y(b[i]), .h_in(h[i]), .c_in(c[i]),
        .s(s[i]), .c_out(c[i+1]), .h_out(h[i+1])
      );
    end else begin : g_ha
      rb_digit_t x;
      assign x = HAS_A ? a[i] : (HAS_B ? b[i] : RB_ZERO);
      rbha u_ha (
        .x(x), .h_in(h[i]), .c_in(c[i]),
        .s(s[i]), .c_out(c[i+1]), .h_out(h[i+1])
      );
    end
  end

endmodule
