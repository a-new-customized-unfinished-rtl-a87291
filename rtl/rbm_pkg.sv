// rbm_pkg: types shared by the redundant binary (RB) multiplier.
//
// An RB digit takes the values -1, 0 and +1 and is carried on two wires,
// p and n, with value p - n:
//   (p,n) = (0,0) -> 0, (1,0) -> +1, (0,1) -> -1, (1,1) -> 0.
// This is the usual "positive/negative bit" coding of an RB digit; an RB
// number is then a pair of ordinary bit vectors X+ and X- with value
// X+ - X-. A radix-4 (modified) Booth digit is carried as three one-hot-ish
// control lines: neg (the digit is negative), one (|digit| = 1) and two
// (|digit| = 2). Digit 0 has all three low.
package rbm_pkg;

  typedef struct packed {
    logic p;  // positive weight bit (X+)
    logic n;  // negative weight bit (X-)
  } rb_digit_t;

  typedef struct packed {
    logic neg;  // Booth digit is -1 or -2
    logic one;  // |digit| = 1: select A
    logic two;  // |digit| = 2: select 2A
  } booth_t;

  localparam rb_digit_t RB_ZERO = '{p: 1'b0, n: 1'b0};

  // Value of one RB digit as a 2-bit two's complement number.
  function automatic logic signed [1:0] rb_val(rb_digit_t d);
    return $signed({1'b0, d.p}) - $signed({1'b0, d.n});
  endfunction

  // Canonical coding of a value in {-1, 0, +1}.
  function automatic rb_digit_t rb_enc(logic signed [1:0] v);
    rb_digit_t d;
    d.p = (v == 2'sd1);
    d.n = (v == -2'sd1);
    return d;
  endfunction

endpackage
