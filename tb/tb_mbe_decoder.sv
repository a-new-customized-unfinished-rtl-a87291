// tb_mbe_decoder: checks one NB Booth row for every Booth digit.
// The row read as an (N+1)-bit two's complement number, plus the neg
// correction bit, must equal digit * A. N = 8 is run for every A, the
// default N = 32 for random A and the extreme values.
module tb_mbe_decoder;
  import rbm_pkg::*;

  logic clk = 0;
  int checks = 0, failures = 0;

  logic [7:0]  a8;
  logic [31:0] a32;
  booth_t      code;
  logic [8:0]  p8;
  logic [32:0] p32;

  mbe_decoder #(.N(8)) dut8  (.a(a8),  .code(code), .p(p8));
  mbe_decoder          dut32 (.a(a32), .code(code), .p(p32));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic booth_t enc(int d);
    booth_t c;
    c.neg = (d < 0);
    c.one = (d == 1 || d == -1);
    c.two = (d == 2 || d == -2);
    return c;
  endfunction

  task automatic check(int d);
    longint exp8, exp32, got8, got32;
    code = enc(d);
    #1;
    exp8  = longint'(d) * longint'($signed(a8));
    exp32 = longint'(d) * longint'($signed(a32));
    got8  = longint'($signed(p8)) + longint'(code.neg);
    got32 = longint'($signed(p32)) + longint'(code.neg);
    checks += 2;
    if (got8 != exp8) begin
      failures++;
      $display("FAIL N=8 a=%0d d=%0d got %0d", $signed(a8), d, got8);
    end
    if (got32 != exp32) begin
      failures++;
      $display("FAIL N=32 a=%0d d=%0d got %0d", $signed(a32), d, got32);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'(i);
      case (i)
        0: a32 = 32'h8000_0000;
        1: a32 = 32'h7fff_ffff;
        2: a32 = 32'hffff_ffff;
        3: a32 = 32'h0;
        default: a32 = $urandom;
      endcase
      for (int d = -2; d <= 2; d++) check(d);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
