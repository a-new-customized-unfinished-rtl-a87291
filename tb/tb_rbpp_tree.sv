// tb_rbpp_tree: checks the RB reduction tree for N = 8 (one stage),
// N = 16 (two), the default N = 32 (three) and N = 64 (four stages), each
// with random rows in the generator's row format (see tree_chk).
module tb_rbpp_tree;

  logic clk = 0;
  int checks = 0, failures = 0;

  int c8, f8, c16, f16, c32, f32, c64, f64;
  logic d8, d16, d32, d64;

  tree_chk #(.N(8),  .NVEC(10000)) u8  (c8,  f8,  d8);
  tree_chk #(.N(16), .NVEC(10000)) u16 (c16, f16, d16);
  tree_chk #(.N(32), .NVEC(10000)) u32 (c32, f32, d32);
  tree_chk #(.N(64), .NVEC(5000))  u64 (c64, f64, d64);

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
    checks = c8 + c16 + c32 + c64;
    failures = f8 + f16 + f32 + f64;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
