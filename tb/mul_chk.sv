// mul_chk: end-to-end test driver for one rb_multiplier of width N.
// Applies NVEC operand pairs (all pairs when EXHAUSTIVE is set, else
// extreme values then random ones) and compares the product with a*b
// computed here in 2N-bit two's complement. Besides the checks it counts
// how often each mechanism of the design was exercised:
//   ev[0] a non-zero ECW moved into the next row (negative Booth digit in
//         a row other than the last),
//   ev[1] last-row ECW folded with the first row's top negative bit,
//   ev[2] last-row ECW folded into the "+1" code (first-row bit set,
//         all four low negative bits of the last row set),
//   ev[3] last-row ECW folded into the last row's low bits only,
//   ev[4] negative digits left in the RB sum (converter has to borrow),
//   ev[5] converter block carry-select took the carry-in-1 sum in some
//         block above block 0,
//   ev[6] last Booth group a -2 digit, ev[7] a +2 digit.
module mul_chk
  import rbm_pkg::*;
#(
  parameter int N          = 8,
  parameter int NVEC       = 1000,
  parameter bit EXHAUSTIVE = 1'b0
) (
  output int       checks,
  output int       failures,
  output int       ev[8],
  output logic     done
);

  localparam int R = N / 4;
  localparam int W = 2 * N;

  logic [N-1:0] a, b;
  logic [W-1:0] p;

  rb_multiplier #(.N(N)) dut (.a(a), .b(b), .p(p));

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
    for (int i = 0; i < 8; i++) ev[i] = 0;
    done = 1'b0;
    for (int t = 0; t < NVEC; t++) begin
      logic [W-1:0] expv;
      logic [2:0] lastg;
      if (EXHAUSTIVE) begin
        {a, b} = W'(t);
      end else if (t < 36) begin
        a = corner(t);
        b = corner(t / 6);
      end else begin
        a = rnd();
        b = rnd();
      end
      #1;
      expv = {{N{a[N-1]}}, a} * {{N{b[N-1]}}, b};
      checks++;
      if (p != expv) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d a=%h b=%h p=%h expected %h", N, a, b, p, expv);
      end
      for (int r = 0; r < R - 1; r++) begin
        if (dut.u_ppg.ecw[r][0].p) begin
          ev[0]++;
          break;
        end
      end
      if (dut.u_ppg.q_first_n) ev[1]++;
      else if (dut.u_ppg.q_first_p != 2'd0) ev[2]++;
      else ev[3]++;
      for (int i = 0; i < W; i++) begin
        if (dut.rb_sum[i].n && !dut.rb_sum[i].p) begin
          ev[4]++;
          break;
        end
      end
      if (|dut.u_conv.cin[dut.u_conv.NB-1:1]) ev[5]++;
      lastg = b[N-1:N-3];
      if (lastg == 3'b100) ev[6]++;
      if (lastg == 3'b011) ev[7]++;
    end
    done = 1'b1;
  end

endmodule
