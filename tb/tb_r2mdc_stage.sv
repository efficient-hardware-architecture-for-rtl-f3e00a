// tb_r2mdc_stage: checks three R2MDC stages of a 16-point FFT on their own.
//   stage 1 (serial input, rotator): output cycle c of a frame x must hold
//     (x[c]+x[c+8])/2 and (x[c]-x[c+8])/2 * W_16^c;
//   stage 2 (two input streams a, b, rotator): output cycles 0..3 hold the
//     butterfly of (a[k], a[k+4]) and cycles 4..7 that of (b[k], b[k+4]),
//     with twiddle W_16^(2k);
//   stage 4 (no rotator): cycle pairs (a[2j],a[2j+1]) then (b[2j],b[2j+1]).
// Sums are exact (floor of the half); rotated values are compared with
// floating point within the rotator's accuracy. The first output of each
// frame must come 8+13, 4+13 and 1+1 cycles after the frame's first input.
`timescale 1ns/1ps
module tb_r2mdc_stage;
  import fft_pkg::*;
  localparam int N = 16;
  localparam int NF = 30;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- DUTs ----
  logic  v1 = 0, v2 = 0, v4 = 0, ov1, ov2, ov4;
  cplx_t x1 = '0, a2 = '0, b2 = '0, a4 = '0, b4 = '0;
  cplx_t op1, on1, op2, on2, op4, on4;

  r2mdc_stage #(.N(N), .STAGE(1), .HAS_TWIDDLE(1)) s1 (.clk, .rst_n, .in_valid(v1), .in_pos(x1), .in_neg(x1),
    .out_valid(ov1), .out_pos(op1), .out_neg(on1));
  r2mdc_stage #(.N(N), .STAGE(2), .HAS_TWIDDLE(1)) s2 (.clk, .rst_n, .in_valid(v2), .in_pos(a2), .in_neg(b2),
    .out_valid(ov2), .out_pos(op2), .out_neg(on2));
  r2mdc_stage #(.N(N), .STAGE(4), .HAS_TWIDDLE(0)) s4 (.clk, .rst_n, .in_valid(v4), .in_pos(a4), .in_neg(b4),
    .out_valid(ov4), .out_pos(op4), .out_neg(on4));

  // ---- expected outputs, one queue per DUT: {pos, neg, twiddle exponent, first-of-frame time} ----
  typedef struct { int pr; int pi; int dr; int di; int m; longint t; } exp_t;
  exp_t e1 [$], e2 [$], e4 [$];

  function automatic int hf(input int v); return int'($floor(real'(v) / 2.0)); endfunction
  function automatic cplx_t rc(input int amp);
    cplx_t c;
    c.re = sample_t'(int'($urandom_range(2 * amp, 0)) - amp);
    c.im = sample_t'(int'($urandom_range(2 * amp, 0)) - amp);
    return c;
  endfunction

  function automatic exp_t bf(input cplx_t p, input cplx_t q, input int m, input longint t);
    exp_t e;
    e.pr = hf(int'(p.re) + int'(q.re)); e.pi = hf(int'(p.im) + int'(q.im));
    e.dr = hf(int'(p.re) - int'(q.re)); e.di = hf(int'(p.im) - int'(q.im));
    e.m = m; e.t = t;
    return e;
  endfunction

  // stage 1 driver: serial frames of 16, random gaps
  initial begin
    cplx_t f [N];
    wait (rst_n);
    @(negedge clk);
    for (int fr = 0; fr < NF; fr++) begin
      for (int n = 0; n < N; n++) f[n] = rc(21000);
      for (int c = 0; c < N / 2; c++) e1.push_back(bf(f[c], f[c + 8], c, c == 0 ? cyc + 8 + 13 : -1));
      for (int n = 0; n < N; n++) begin v1 = 1'b1; x1 = f[n]; @(negedge clk); end
      v1 = 1'b0;
      repeat ($urandom_range(3, 0)) @(negedge clk);
    end
  end

  // stage 2 and stage 4 drivers: 8-cycle bursts of two streams, 8 or more cycles apart
  task automatic drive_later(input int H, input int st);
    cplx_t a [8], b [8];
    longint t0;
    for (int fr = 0; fr < NF; fr++) begin
      for (int n = 0; n < 8; n++) begin a[n] = rc(21000); b[n] = rc(21000); end
      t0 = cyc;
      for (int j = 0; j < 8 / (2 * H); j++) begin
        for (int k = 0; k < H; k++) begin
          if (st == 2) e2.push_back(bf(a[2*H*j + k], a[2*H*j + k + H], k * 2, (j == 0 && k == 0) ? t0 + H + 13 : -1));
          else         e4.push_back(bf(a[2*H*j + k], a[2*H*j + k + H], 0,     (j == 0 && k == 0) ? t0 + H + 1  : -1));
        end
        for (int k = 0; k < H; k++) begin
          if (st == 2) e2.push_back(bf(b[2*H*j + k], b[2*H*j + k + H], k * 2, -1));
          else         e4.push_back(bf(b[2*H*j + k], b[2*H*j + k + H], 0,     -1));
        end
      end
      for (int n = 0; n < 8; n++) begin
        if (st == 2) begin v2 = 1'b1; a2 = a[n]; b2 = b[n]; end
        else         begin v4 = 1'b1; a4 = a[n]; b4 = b[n]; end
        @(negedge clk);
      end
      if (st == 2) v2 = 1'b0; else v4 = 1'b0;
      repeat (8 + $urandom_range(4, 0)) @(negedge clk);
    end
  endtask

  initial begin wait (rst_n); @(negedge clk); drive_later(4, 2); end
  initial begin wait (rst_n); @(negedge clk); drive_later(1, 4); end

  // ---- checkers ----
  int got1 = 0, got2 = 0, got4 = 0;

  task automatic check_out(input string nm, input exp_t e, input cplx_t p, input cplx_t q);
    real th, xr, xi, err;
    checks++;
    if (int'(p.re) != e.pr || int'(p.im) != e.pi) begin
      failures++;
      $display("FAIL %s sum (%0d,%0d) expected (%0d,%0d)", nm, p.re, p.im, e.pr, e.pi);
    end
    th = -2.0 * PI * real'(e.m) / real'(N);
    xr = real'(e.dr) * $cos(th) - real'(e.di) * $sin(th);
    xi = real'(e.dr) * $sin(th) + real'(e.di) * $cos(th);
    err = $sqrt((real'(q.re) - xr) ** 2 + (real'(q.im) - xi) ** 2);
    checks++;
    if (err > 3.0 + 0.004 * $sqrt(xr * xr + xi * xi)) begin
      failures++;
      $display("FAIL %s diff (%0d,%0d) expected (%0.1f,%0.1f)", nm, q.re, q.im, xr, xi);
    end
    if (e.t >= 0) begin
      checks++;
      if (e.t != cyc) begin failures++; $display("FAIL %s first output at %0d expected %0d", nm, cyc, e.t); end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ov1) begin check_out("stage1", e1.pop_front(), op1, on1); got1++; end
    if (ov2) begin check_out("stage2", e2.pop_front(), op2, on2); got2++; end
    if (ov4) begin check_out("stage4", e4.pop_front(), op4, on4); got4++; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (got1 == NF * 8 && got2 == NF * 8 && got4 == NF * 8);
    repeat (5) @(posedge clk);
    checks++;
    if (ov1 || ov2 || ov4) begin failures++; $display("FAIL extra output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d %0d %0d", got1, got2, got4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
