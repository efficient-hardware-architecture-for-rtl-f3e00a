// tb_butterfly: checks the halving radix-2 DIF butterfly.
// Random and extreme complex inputs; expected sum and difference are
// floor((a+b)/2) and floor((a-b)/2) worked out in floating point.
`timescale 1ns/1ps
module tb_butterfly;
  import fft_pkg::*;
  logic clk = 1'b0;
  cplx_t a, b, sum, diff;
  int checks = 0, failures = 0;

  butterfly dut (.a, .b, .sum, .diff);
  always #5 clk = ~clk;

  function automatic int half_floor(input int v);
    return int'($floor(real'(v) / 2.0));
  endfunction

  task automatic check1(input string nm, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", nm, got, exp_v);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      if (i < 4) begin
        a.re = (i & 1) ? 16'sh7fff : 16'sh8000; a.im = (i & 2) ? 16'sh7fff : 16'sh8000;
        b.re = (i & 2) ? 16'sh8000 : 16'sh7fff; b.im = (i & 1) ? 16'sh8000 : 16'sh7fff;
      end else begin
        a = cplx_t'($urandom); b = cplx_t'($urandom);
      end
      @(posedge clk);
      check1("sum.re",  int'(sum.re),  half_floor(int'(a.re) + int'(b.re)));
      check1("sum.im",  int'(sum.im),  half_floor(int'(a.im) + int'(b.im)));
      check1("diff.re", int'(diff.re), half_floor(int'(a.re) - int'(b.re)));
      check1("diff.im", int'(diff.im), half_floor(int'(a.im) - int'(b.im)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
