// tree_chk: test driver for one rbpp_tree instance of width N.
// Fills every row r with random RB digits in the columns the generator
// can use (4r-4 .. 4r+N+2, clipped to the word) and checks that the tree
// output has the value of the sum of all rows modulo 2^(2N). Every
// NVEC/4th vector uses all-(+1) or all-(-1) rows, the worst case for
// carries.
module tree_chk
  import rbm_pkg::*;
#(
  parameter int N    = 8,
  parameter int NVEC = 1000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int R = N / 4;
  localparam int W = 2 * N;

  rb_digit_t [R-1:0][W-1:0] pp;
  rb_digit_t [W-1:0]        sum;

  rbpp_tree #(.N(N)) dut (.pp(pp), .sum(sum));

  function automatic logic [W-1:0] rowval(rb_digit_t [W-1:0] d);
    logic [W-1:0] pv, nv;
    for (int i = 0; i < W; i++) begin
      pv[i] = d[i].p;
      nv[i] = d[i].n;
    end
    return pv - nv;
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int t = 0; t < NVEC; t++) begin
      logic [W-1:0] expv;
      pp = '0;
      expv = '0;
      for (int r = 0; r < R; r++) begin
        for (int c = (r == 0 ? 0 : 4 * r - 4); c <= 4 * r + N + 2 && c < W; c++) begin
          case (t % 4)
            1: pp[r][c] = 2'b10;
            2: pp[r][c] = 2'b01;
            default: pp[r][c] = rb_digit_t'($urandom_range(3, 0));
          endcase
        end
        expv += rowval(pp[r]);
      end
      #1;
      checks++;
      if (rowval(sum) != expv) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d tree sum %h expected %h", N, rowval(sum), expv);
      end
    end
    done = 1'b1;
  end

endmodule
