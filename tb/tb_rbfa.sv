// tb_rbfa: exhaustive check of the RB full adder cell.
// All 16 codings of x and y (including the redundant (1,1) zero), both
// values of h_in and every carry-in that the column below can send with
// that h_in (h_in = 1: 0 or +1; h_in = 0: -1 or 0) are applied. Checked:
// x + y + c_in = 2*c_out + s, s and c_out are valid digits, h_out says
// whether both inputs are non-negative, and the carry for x + y = +-1
// follows h_in as the carry-free rule requires.
module tb_rbfa;
  import rbm_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;

  rb_digit_t x, y, c_in, s, c_out;
  logic h_in, h_out;

  rbfa dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int v(rb_digit_t d);
    return int'(d.p) - int'(d.n);
  endfunction

  initial begin
    for (int k = 0; k < 64; k++) begin
      int ci;
      x = rb_digit_t'(k[1:0]);
      y = rb_digit_t'(k[3:2]);
      h_in = k[4];
      ci = h_in ? int'(k[5]) : -int'(k[5]);
      c_in = (ci == 1) ? 2'b10 : (ci == -1) ? 2'b01 : 2'b00;
      @(posedge clk);
      checks += 4;
      if (v(x) + v(y) + ci != 2 * v(c_out) + v(s)) begin
        failures++;
        $display("FAIL x=%0d y=%0d cin=%0d: s=%0d c=%0d", v(x), v(y), ci, v(s), v(c_out));
      end
      if (s == 2'b11 || c_out == 2'b11) begin
        failures++;
        $display("FAIL non-canonical output");
      end
      if (h_out != (v(x) >= 0 && v(y) >= 0)) begin
        failures++;
        $display("FAIL h_out x=%0d y=%0d", v(x), v(y));
      end
      if ((v(x) + v(y) == 1 && v(c_out) != (h_in ? 1 : 0)) ||
          (v(x) + v(y) == -1 && v(c_out) != (h_in ? 0 : -1))) begin
        failures++;
        $display("FAIL carry choice x=%0d y=%0d h_in=%b", v(x), v(y), h_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
