// tb_rbha: exhaustive check of the RB half adder cell.
// All four codings of x, both values of h_in and every carry-in the column
// below can send with that h_in are applied. Checked: x + c_in =
// 2*c_out + s with valid output digits, h_out = (x >= 0), and the carry for
// x = +-1 follows h_in.
module tb_rbha;
  import rbm_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;

  rb_digit_t x, c_in, s, c_out;
  logic h_in, h_out;

  rbha dut (.*);

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
    for (int k = 0; k < 16; k++) begin
      int ci;
      x = rb_digit_t'(k[1:0]);
      h_in = k[2];
      ci = h_in ? int'(k[3]) : -int'(k[3]);
      c_in = (ci == 1) ? 2'b10 : (ci == -1) ? 2'b01 : 2'b00;
      @(posedge clk);
      checks += 4;
      if (v(x) + ci != 2 * v(c_out) + v(s)) begin
        failures++;
        $display("FAIL x=%0d cin=%0d: s=%0d c=%0d", v(x), ci, v(s), v(c_out));
      end
      if (s == 2'b11 || c_out == 2'b11) begin
        failures++;
        $display("FAIL non-canonical output");
      end
      if (h_out != (v(x) >= 0)) begin
        failures++;
        $display("FAIL h_out x=%0d", v(x));
      end
      if ((v(x) == 1 && v(c_out) != (h_in ? 1 : 0)) ||
          (v(x) == -1 && v(c_out) != (h_in ? 0 : -1))) begin
        failures++;
        $display("FAIL carry choice x=%0d h_in=%b", v(x), h_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
