// fft_size_harness: drives one r2mdc_fft of size N with frames of complex
// tones (one bin, random amplitude and bin) and random noise-like samples,
// and compares every output bin with a floating-point DFT divided by N.
// The error allowed grows with the number of stages: each stage adds the
// rounding of its halving and the angle error of a 10-iteration rotator.
// Reports its own check and failure counts and raises 'done'.
`timescale 1ns/1ps
module fft_size_harness #(
  parameter int N  = 128,
  parameter int NF = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import fft_pkg::*;
  localparam int  LOGN = $clog2(N);
  localparam real PI   = 3.14159265358979323846;

  logic in_valid = 1'b0, out_valid;
  cplx_t in_data = '0, out_pos, out_neg;
  logic [LOGN-1:0] out_bin_pos, out_bin_neg;

  r2mdc_fft #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_pos, .out_neg,
                          .out_bin_pos, .out_bin_neg);

  real xr [NF][N];
  real xi [NF][N];
  int of = 0, oc = 0;
  real max_err = 0.0;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int f = 0; f < NF; f++) begin
      int bin, amp;
      real ph;
      bin = int'($urandom_range(N - 1, 0));
      amp = 8000 + int'($urandom_range(20000, 0));
      for (int n = 0; n < N; n++) begin
        if (f % 2 == 0) begin
          ph = 2.0 * PI * real'(bin * n) / real'(N);
          xr[f][n] = real'($rtoi(real'(amp) * $cos(ph)));
          xi[f][n] = real'($rtoi(real'(amp) * $sin(ph)));
        end else begin
          xr[f][n] = real'(int'($urandom_range(40000, 0)) - 20000);
          xi[f][n] = real'(int'($urandom_range(40000, 0)) - 20000);
        end
      end
    end
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < N; n++) begin
        in_valid   = 1'b1;
        in_data.re = sample_t'($rtoi(xr[f][n]));
        in_data.im = sample_t'($rtoi(xi[f][n]));
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (f) @(negedge clk);
    end
  end

  function automatic int brev(input int v);
    int r = 0;
    for (int i = 0; i < LOGN; i++) if (v & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  task automatic check_bin(input int f, input int k, input cplx_t got);
    real er, ei, ph, e, amp, tol;
    er = 0.0; ei = 0.0; amp = 0.0;
    for (int n = 0; n < N; n++) begin
      ph = -2.0 * PI * real'((k * n) % N) / real'(N);
      er += xr[f][n] * $cos(ph) - xi[f][n] * $sin(ph);
      ei += xr[f][n] * $sin(ph) + xi[f][n] * $cos(ph);
      amp += $sqrt(xr[f][n] ** 2 + xi[f][n] ** 2);
    end
    er = er / real'(N); ei = ei / real'(N); amp = amp / real'(N);
    tol = 2.0 * real'(LOGN) + 0.003 * real'(LOGN) * amp;
    e = $sqrt((real'(got.re) - er) ** 2 + (real'(got.im) - ei) ** 2);
    if (e > max_err) max_err = e;
    checks++;
    if (e > tol) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                                  N, f, k, got.re, got.im, er, ei);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && of < NF) begin
    checks++;
    if (int'(out_bin_pos) != brev(2 * oc) || int'(out_bin_neg) != brev(2 * oc + 1)) begin
      failures++;
      $display("FAIL N=%0d bin index", N);
    end
    check_bin(of, brev(2 * oc), out_pos);
    check_bin(of, brev(2 * oc + 1), out_neg);
    if (oc == N / 2 - 1) begin
      oc = 0; of++;
      if (of == NF) begin
        $display("N=%0d: %0d frames, largest bin error %0.2f LSB", N, NF, max_err);
        done = 1'b1;
      end
    end else oc++;
  end
endmodule
