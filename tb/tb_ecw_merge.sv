// tb_ecw_merge: checks that the last-row ECW fold keeps the window value.
// All 32 legal input cases are applied: first-row sign s (top digits
// s, s / s), the two low negative bits of the last row (~y0, ~y1, with the
// two bits below them zero) and the ECW "0 E 0 F" with F = negx,
// E = negy - 1. For each, the value of the rewritten slots must equal the
// value of the original window, and the cases that need the first row's
// top negative bit (value below -15) and the "+1" case must occur.
module tb_ecw_merge;
  import rbm_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;
  int n_topneg = 0, n_plus = 0;

  logic [1:0] first_p, q_first_p;
  logic       first_n, q_first_n;
  logic [3:0] last_n, q_last_n;
  rb_digit_t [3:0] ecw;

  ecw_merge dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      int t_in, t_out;
      logic s, ny0, ny1, negx, negy;
      {s, ny0, ny1, negx, negy} = 5'(k);
      first_p = {s, s};
      first_n = s;
      last_n = {ny1, ny0, 2'b00};
      ecw[0] = '{p: negx, n: 1'b0};
      ecw[1] = RB_ZERO;
      ecw[2] = '{p: 1'b0, n: ~negy};
      ecw[3] = RB_ZERO;
      @(posedge clk);
      t_in = 48 * int'(s) - 64 * int'(s) - 4 * int'(ny0) - 8 * int'(ny1)
           + int'(negx) - 4 * int'(!negy);
      t_out = 16 * int'(q_first_p) - 64 * int'(q_first_n) - int'(q_last_n);
      checks++;
      if (t_in != t_out) begin
        failures++;
        $display("FAIL case %b: window %0d rewritten as %0d", 5'(k), t_in, t_out);
      end
      if (q_first_n) n_topneg++;
      if (t_in == 1) n_plus++;
    end
    checks += 2;
    if (n_topneg == 0) begin
      failures++;
      $display("FAIL first-row top negative bit never used");
    end
    if (n_plus == 0) begin
      failures++;
      $display("FAIL window value +1 never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
