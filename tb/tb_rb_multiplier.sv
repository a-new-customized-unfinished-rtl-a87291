// tb_rb_multiplier: end-to-end test of the RB multiplier at the four word
// lengths the design targets: 8x8 for every operand pair, 16x16, 32x32 and
// 64x64 for extreme and random operands (see mul_chk). Every product must
// be exact, and every mechanism counted by mul_chk (ECW moved to the next
// row, the three kinds of last-ECW fold, negative RB sum digits, converter
// carry-select, last Booth digit +-2) must have happened at least once at
// each size; a mechanism that never happened counts as a failure.
module tb_rb_multiplier;

  logic clk = 0;
  int checks = 0, failures = 0;

  int c[4], f[4];
  int ev[4][8];
  logic d[4];

  mul_chk #(.N(8),  .NVEC(65536), .EXHAUSTIVE(1'b1)) u8  (c[0], f[0], ev[0], d[0]);
  mul_chk #(.N(16), .NVEC(20000)) u16 (c[1], f[1], ev[1], d[1]);
  mul_chk #(.N(32), .NVEC(20000)) u32 (c[2], f[2], ev[2], d[2]);
  mul_chk #(.N(64), .NVEC(10000)) u64 (c[3], f[3], ev[3], d[3]);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2;
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int s = 0; s < 4; s++) begin
      checks += c[s] + 8;
      failures += f[s];
      $display("N=%0d: ecw_moved=%0d fold_topneg=%0d fold_plus1=%0d fold_low=%0d rb_neg_digits=%0d csel_carry=%0d last_m2=%0d last_p2=%0d",
               8 << s, ev[s][0], ev[s][1], ev[s][2], ev[s][3], ev[s][4], ev[s][5], ev[s][6], ev[s][7]);
      for (int e = 0; e < 8; e++) begin
        if (ev[s][e] == 0) begin
          failures++;
          $display("FAIL N=%0d: mechanism %0d never happened", 8 << s, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
