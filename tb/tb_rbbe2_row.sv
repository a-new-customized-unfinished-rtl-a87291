// tb_rbbe2_row: checks one RB partial product row and its ECW.
// The value of the row (sum of (p - n) * 2^j) plus the value of its ECW
// must equal (dx + 4*dy) * A, where dx and dy are the Booth digits of the
// low and high group, worked out here from the five multiplier bits. N = 8
// runs every A and every 5-bit group pattern; the default N = 32 runs
// random A. The ECW must also have the "0 E 0 F" shape: F >= 0, E <= 0.
module tb_rbbe2_row;
  import rbm_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;

  logic [7:0]  a8;
  logic [31:0] a32;
  logic [4:0]  g5;
  rb_digit_t [10:0] row8;
  rb_digit_t [34:0] row32;
  rb_digit_t [3:0]  ecw8, ecw32;

  rbbe2_row #(.N(8)) dut8  (.a(a8),  .grp5(g5), .row(row8),  .ecw(ecw8));
  rbbe2_row          dut32 (.a(a32), .grp5(g5), .row(row32), .ecw(ecw32));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bdig(logic [2:0] g);
    return -2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
  endfunction

  function automatic longint rbv(rb_digit_t d, int j);
    return (longint'(d.p) - longint'(d.n)) <<< j;
  endfunction

  task automatic check_one();
    longint v8 = 0, v32 = 0, e8, e32, dsum;
    dsum = longint'(bdig(g5[2:0]) + 4 * bdig(g5[4:2]));
    for (int j = 0; j < 11; j++) v8 += rbv(row8[j], j);
    for (int j = 0; j < 35; j++) v32 += rbv(row32[j], j);
    for (int j = 0; j < 4; j++) begin
      v8 += rbv(ecw8[j], j);
      v32 += rbv(ecw32[j], j);
    end
    e8 = dsum * longint'($signed(a8));
    e32 = dsum * longint'($signed(a32));
    checks += 3;
    if (v8 != e8) begin
      failures++;
      $display("FAIL N=8 a=%0d g=%b row=%0d exp=%0d", $signed(a8), g5, v8, e8);
    end
    if (v32 != e32) begin
      failures++;
      $display("FAIL N=32 a=%0d g=%b row=%0d exp=%0d", $signed(a32), g5, v32, e32);
    end
    if (ecw8[0].n || ecw8[2].p || ecw8[1] != RB_ZERO || ecw8[3] != RB_ZERO) begin
      failures++;
      $display("FAIL ECW shape g=%b", g5);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int g = 0; g < 32; g++) begin
        a8 = 8'(i);
        a32 = (i == 0) ? 32'h8000_0000 : (i == 1) ? 32'h7fff_ffff : $urandom;
        g5 = 5'(g);
        #1;
        check_one();
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
