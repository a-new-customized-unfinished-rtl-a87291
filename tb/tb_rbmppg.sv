// tb_rbmppg: checks the RBMPPG-2 partial product generator.
// N = 8 is run for all 65536 operand pairs; N = 16, the default N = 32 and
// N = 64 for corner and random operands (see rbmppg_chk). For every size
// the rows must add up to the exact product, with N/4 rows and no digit
// outside each row's columns, and the last-ECW fold must at least once have
// used the first row's top negative bit.
module tb_rbmppg;

  logic clk = 0;
  int checks = 0, failures = 0;

  int c8, f8, t8, c16, f16, t16, c32, f32, t32, c64, f64, t64;
  logic d8, d16, d32, d64;

  rbmppg_chk #(.N(8),  .NVEC(65536), .EXHAUSTIVE(1'b1)) u8  (c8,  f8,  t8,  d8);
  rbmppg_chk #(.N(16), .NVEC(20000)) u16 (c16, f16, t16, d16);
  rbmppg_chk #(.N(32), .NVEC(20000)) u32 (c32, f32, t32, d32);
  rbmppg_chk #(.N(64), .NVEC(5000))  u64 (c64, f64, t64, d64);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2;
    wait (d8 && d16 && d32 && d64);
    checks = c8 + c16 + c32 + c64 + 4;
    failures = f8 + f16 + f32 + f64;
    if (t8 == 0)  failures++;
    if (t16 == 0) failures++;
    if (t32 == 0) failures++;
    if (t64 == 0) failures++;
    $display("last-ECW folds using the first row's top bit: N=8 %0d, N=16 %0d, N=32 %0d, N=64 %0d",
             t8, t16, t32, t64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
