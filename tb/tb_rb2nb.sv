// tb_rb2nb: checks the RB to two's complement converter.
// The default 64-digit converter and a 13-digit one (a width that is not a
// multiple of the block size) get random RB numbers plus patterns that
// make the carry run across every block (X+ all ones, X- zero; X+ zero,
// X- one at the bottom). The result must equal X+ - X- modulo 2^W.
module tb_rb2nb;
  import rbm_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;

  rb_digit_t [63:0] d64;
  rb_digit_t [12:0] d13;
  logic [63:0] y64;
  logic [12:0] y13;

  rb2nb dut64 (.d(d64), .y(y64));
  rb2nb #(.W(13)) dut13 (.d(d13), .y(y13));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [63:0] pv, nv;
      case (t)
        0: begin pv = '1; nv = '0; end
        1: begin pv = '0; nv = 64'd1; end
        2: begin pv = '1; nv = '1; end
        3: begin pv = 64'h8000_0000_0000_0000; nv = 64'd1; end
        default: begin pv = {$urandom, $urandom}; nv = {$urandom, $urandom}; end
      endcase
      for (int i = 0; i < 64; i++) d64[i] = '{p: pv[i], n: nv[i]};
      for (int i = 0; i < 13; i++) d13[i] = '{p: pv[i], n: nv[i]};
      @(posedge clk);
      checks += 2;
      if (y64 != pv - nv) begin
        failures++;
        $display("FAIL W=64 %h - %h: got %h", pv, nv, y64);
      end
      if (y13 != 13'(pv - nv)) begin
        failures++;
        $display("FAIL W=13 %h - %h: got %h", pv[12:0], nv[12:0], y13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
