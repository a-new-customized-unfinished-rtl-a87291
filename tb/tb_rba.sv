// tb_rba: checks the carry-free RB adder block.
// Two instances are driven with random RB numbers: one 64 digits wide with
// both operands everywhere (all full adders), one 24 digits wide whose
// operands only partly overlap (A in 0..15, B in 6..21, so columns
// 0..5 and 16..23 use half adders). The value of the sum must equal the sum
// of the operand values modulo 2^W. Runs of +1 and -1 digits, which would
// make a carry ripple in an ordinary adder, are included.
module tb_rba;
  import rbm_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;

  rb_digit_t [63:0] a64, b64, s64;
  rb_digit_t [23:0] a24, b24, s24;

  rba dut64 (.a(a64), .b(b64), .s(s64));
  rba #(.W(24), .A_LO(0), .A_HI(15), .B_LO(6), .B_HI(21))
    dut24 (.a(a24), .b(b24), .s(s24));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] val64(rb_digit_t [63:0] d);
    logic [63:0] pv, nv;
    for (int i = 0; i < 64; i++) begin
      pv[i] = d[i].p;
      nv[i] = d[i].n;
    end
    return pv - nv;
  endfunction

  function automatic logic [23:0] val24(rb_digit_t [23:0] d);
    logic [23:0] pv, nv;
    for (int i = 0; i < 24; i++) begin
      pv[i] = d[i].p;
      nv[i] = d[i].n;
    end
    return pv - nv;
  endfunction

  function automatic rb_digit_t rnd_digit(int mode);
    case (mode)
      1: return 2'b10;
      2: return 2'b01;
      default: return rb_digit_t'($urandom_range(3, 0));
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int ma, mb;
      ma = (t % 7 == 1) ? 1 : (t % 7 == 2) ? 2 : 0;
      mb = (t % 5 == 3) ? 1 : (t % 5 == 4) ? 2 : 0;
      for (int i = 0; i < 64; i++) begin
        a64[i] = rnd_digit(ma);
        b64[i] = rnd_digit(mb);
      end
      a24 = '0;
      b24 = '0;
      for (int i = 0; i <= 15; i++) a24[i] = rnd_digit(ma);
      for (int i = 6; i <= 21; i++) b24[i] = rnd_digit(mb);
      @(posedge clk);
      checks += 2;
      if (val64(s64) != val64(a64) + val64(b64)) begin
        failures++;
        $display("FAIL W=64 got %h expected %h", val64(s64), val64(a64) + val64(b64));
      end
      if (val24(s24) != val24(a24) + val24(b24)) begin
        failures++;
        $display("FAIL W=24 got %h expected %h", val24(s24), val24(a24) + val24(b24));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
