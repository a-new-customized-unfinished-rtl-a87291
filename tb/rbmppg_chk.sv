// rbmppg_chk: test driver for one rbmppg instance of width N.
// Applies NVEC operand pairs (every pair when EXHAUSTIVE is set, else the
// extreme values followed by random ones) and checks that
//   * the N/4 rows add up to a*b modulo 2^(2N) (row value = sum of
//     (p - n) * 2^column), and
//   * row r has no digit outside columns 4r-4 .. 4r+N+2, i.e. the ECWs
//     really live inside the rows and no extra row is needed.
// It also counts the cases where the last row's ECW fold had to use the
// first row's top negative bit. Results come out on ports when done rises.
module rbmppg_chk
  import rbm_pkg::*;
#(
  parameter int N          = 8,
  parameter int NVEC       = 1000,
  parameter bit EXHAUSTIVE = 1'b0
) (
  output int   checks,
  output int   failures,
  output int   n_topneg,
  output logic done
);

  localparam int R = N / 4;
  localparam int W = 2 * N;

  logic [N-1:0] a, b;
  rb_digit_t [R-1:0][W-1:0] pp;

  rbmppg #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  function automatic logic [W-1:0] rowval(rb_digit_t [W-1:0] d);
    logic [W-1:0] pv, nv;
    for (int i = 0; i < W; i++) begin
      pv[i] = d[i].p;
      nv[i] = d[i].n;
    end
    return pv - nv;
  endfunction

  function automatic logic [N-1:0] corner(int i);
    case (i % 6)
      0: return {1'b1, {(N-1){1'b0}}};
      1: return {1'b0, {(N-1){1'b1}}};
      2: return '1;
      3: return '0;
      4: return N'(1);
      default: return {1'b1, {(N-2){1'b0}}, 1'b1};
    endcase
  endfunction

  function automatic logic [N-1:0] rnd();
    logic [127:0] r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return r[N-1:0];
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    n_topneg = 0;
    done = 1'b0;
    for (int t = 0; t < NVEC; t++) begin
      logic [W-1:0] sum, expv;
      if (EXHAUSTIVE) begin
        {a, b} = (2*N)'(t);
      end else if (t < 36) begin
        a = corner(t);
        b = corner(t / 6);
      end else begin
        a = rnd();
        b = rnd();
      end
      #1;
      sum = '0;
      for (int r = 0; r < R; r++) sum += rowval(pp[r]);
      expv = {{N{a[N-1]}}, a} * {{N{b[N-1]}}, b};
      checks++;
      if (sum != expv) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d a=%h b=%h rows sum %h expected %h", N, a, b, sum, expv);
      end
      for (int r = 0; r < R; r++) begin
        for (int c = 0; c < W; c++) begin
          if ((c < 4 * r - 4 || c > 4 * r + N + 2) && pp[r][c] != RB_ZERO) begin
            failures++;
            $display("FAIL N=%0d row %0d has a digit at column %0d", N, r, c);
          end
        end
      end
      checks++;
      if (dut.q_first_n) n_topneg++;
    end
    done = 1'b1;
  end

endmodule
