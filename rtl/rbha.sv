// rbha: redundant binary half adder cell (one digit column).
//
// Used in the columns of an RB adder where only one operand has digits.
// It is the RB full adder with the second digit fixed at 0:
//   x = +1: h_in ? (c=+1, w=-1) : (c=0, w=+1)
//   x = -1: h_in ? (c= 0, w=-1) : (c=-1, w=+1)
//   x =  0: c=0, w=0
// s = w + c_in, h_out = (x >= 0). It passes the carry of the column below
// on without creating a long carry chain. The original design only names the
// cell; these equations are the classic rules with y = 0.
//
// Interface: x (the column's only digit), h_in, c_in (from the column
// below), s, c_out, h_out. Timing: combinational, constant depth.
module rbha
  import rbm_pkg::*;
(
  input  rb_digit_t x,
  input  logic      h_in,
  input  rb_digit_t c_in,
  output rb_digit_t s,
  output rb_digit_t c_out,
  output logic      h_out
);

  logic signed [1:0] c, w;

  always_comb begin
    h_out = !(x.n && !x.p);
    unique case (rb_val(x))
      2'sd1:   begin c = h_in ? 2'sd1 : 2'sd0;  w = h_in ? -2'sd1 : 2'sd1; end
      -2'sd1:  begin c = h_in ? 2'sd0 : -2'sd1; w = h_in ? -2'sd1 : 2'sd1; end
      default: begin c = 2'sd0; w = 2'sd0; end
    endcase
    c_out = rb_enc(c);
    s = rb_enc(w + rb_val(c_in));
  end

endmodule
