// tb_r2mdc_fft_lte_sizes: runs the FFT generated for 128 and 2048 points,
// the smallest and largest power-of-two sizes of the LTE transform range,
// side by side, with tone and random frames checked against a floating-point
// DFT (see fft_size_harness).
`timescale 1ns/1ps
module tb_r2mdc_fft_lte_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic d1, d2;
  int c1, f1, c2, f2;
  int checks, failures;

  always #5 clk = ~clk;

  fft_size_harness #(.N(128),  .NF(6)) h128  (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  fft_size_harness #(.N(2048), .NF(4)) h2048 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (d1 && d2);
    checks = c1 + c2;
    failures = f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    checks = c1 + c2;
    failures = f1 + f2 + 1;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
