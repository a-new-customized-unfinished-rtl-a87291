// tb_mbe_encoder: exhaustive check of the radix-4 Booth encoder.
// For all eight groups it compares the encoded digit with
// -2*b[2k+1] + b[2k] + b[2k-1] and checks that neg is set only for the
// groups 100, 101, 110 and that one/two are never both set.
module tb_mbe_encoder;
  import rbm_pkg::*;

  logic [2:0] grp;
  booth_t     code;
  int checks = 0, failures = 0;
  logic clk = 0;

  mbe_encoder dut (.grp(grp), .code(code));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int ref_d, got_d;
      grp = 3'(g);
      @(posedge clk);
      ref_d = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      got_d = (code.neg ? -1 : 1) * (int'(code.one) + 2 * int'(code.two));
      checks++;
      if (got_d != ref_d) begin
        failures++;
        $display("FAIL grp=%b digit=%0d expected %0d", grp, got_d, ref_d);
      end
      checks++;
      if (code.neg != (ref_d < 0)) begin
        failures++;
        $display("FAIL grp=%b neg=%b", grp, code.neg);
      end
      checks++;
      if (code.one && code.two) begin
        failures++;
        $display("FAIL grp=%b one and two both set", grp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
