// rbfa: redundant binary full adder cell (one digit column).
//
// Adds two RB digits x, y in {-1,0,+1} without carry propagation. The
// column sum x+y in [-2,2] is split as x+y = 2*c + w, where the choice for
// sums of +-1 depends on h_in, a flag from the column below that says both
// of its input digits are non-negative (so its carry into this column is
// 0 or +1):
//   x+y = +2: c=+1, w= 0          x+y = -2: c=-1, w=0
//   x+y = +1: h_in ? (c=+1, w=-1) : (c=0, w=+1)
//   x+y = -1: h_in ? (c= 0, w=-1) : (c=-1, w=+1)
//   x+y =  0: c=0, w=0
// and the sum digit s = w + c_in never leaves {-1,0,+1}. The carry is
// therefore decided by two columns only, whatever the word length.
// The original design uses a cell of this kind from the literature without giving
// its equations; these are the classic carry-free RB addition rules.
//
// Interface: x, y (RB digits of this column), h_in and c_in (from the
// column below; c_in is an RB digit), s (sum digit), c_out and h_out (to
// the column above). Timing: combinational, constant depth.
module rbfa
  import rbm_pkg::*;
(
  input  rb_digit_t x,
  input  rb_digit_t y,
  input  logic      h_in,
  input  rb_digit_t c_in,
  output rb_digit_t s,
  output rb_digit_t c_out,
  output logic      h_out
);

  logic signed [2:0] sum;
  logic signed [1:0] c, w;

  always_comb begin
    sum = 3'(rb_val(x)) + 3'(rb_val(y));
    h_out = !(x.n && !x.p) && !(y.n && !y.p);
    unique case (sum)
      3'sd2:   begin c = 2'sd1;  w = 2'sd0;  end
      3'sd1:   begin c = h_in ? 2'sd1 : 2'sd0;  w = h_in ? -2'sd1 : 2'sd1; end
      -3'sd1:  begin c = h_in ? 2'sd0 : -2'sd1; w = h_in ? -2'sd1 : 2'sd1; end
      -3'sd2:  begin c = -2'sd1; w = 2'sd0;  end
      default: begin c = 2'sd0;  w = 2'sd0;  end
    endcase
    c_out = rb_enc(c);
    s = rb_enc(w + rb_val(c_in));
  end

endmodule
