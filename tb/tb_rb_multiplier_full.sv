// tb_rb_multiplier_full: the multiplier at its default size (32 x 32),
// untouched parameters. Runs a fixed set of extreme operand pairs (most
// negative, most positive, -1, 0, 1, alternating bit patterns) in every
// combination, then 100000 random pairs, and compares each 64-bit product
// with a*b computed here. It also requires that the last row's
// error-correcting word was folded at least once in each of its three
// ways and that ECWs were moved into the next row.
module tb_rb_multiplier_full;

  logic clk = 0;
  int checks = 0, failures = 0;
  int n_moved = 0, n_topneg = 0, n_plus = 0, n_low = 0;

  logic [31:0] a, b;
  logic [63:0] p;

  rb_multiplier dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] CORNERS[10] = '{
    32'h8000_0000, 32'h7fff_ffff, 32'hffff_ffff, 32'h0000_0000, 32'h0000_0001,
    32'h5555_5555, 32'haaaa_aaaa, 32'h8000_0001, 32'h0001_0000, 32'hfffe_0000
  };

  task automatic apply(logic [31:0] x, logic [31:0] y);
    logic [63:0] expv;
    a = x;
    b = y;
    @(posedge clk);
    expv = {{32{x[31]}}, x} * {{32{y[31]}}, y};
    checks++;
    if (p != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, expv);
    end
    for (int r = 0; r < 7; r++) begin
      if (dut.u_ppg.ecw[r][0].p || !dut.u_ppg.ecw[r][2].n) begin
        n_moved++;
        break;
      end
    end
    if (dut.u_ppg.q_first_n) n_topneg++;
    else if (dut.u_ppg.q_first_p != 2'd0) n_plus++;
    else n_low++;
  endtask

  initial begin
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        apply(CORNERS[i], CORNERS[j]);
    for (int t = 0; t < 100000; t++) apply($urandom, $urandom);
    checks += 4;
    if (n_moved == 0)  begin failures++; $display("FAIL no ECW moved"); end
    if (n_topneg == 0) begin failures++; $display("FAIL no fold using the top bit"); end
    if (n_plus == 0)   begin failures++; $display("FAIL no +1 fold"); end
    if (n_low == 0)    begin failures++; $display("FAIL no low-bit fold"); end
    $display("ECW moved %0d, last-ECW folds: top bit %0d, +1 %0d, low bits %0d",
             n_moved, n_topneg, n_plus, n_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
