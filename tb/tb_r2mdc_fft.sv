// tb_r2mdc_fft: end-to-end test of the R2MDC FFT at its default size (N = 16).
//
// Feeds frames of impulses, DC, single tones, real exponentially decaying
// bursts (the shape of an acoustic-emission hit) and random samples (inside
// the disk |x| < 2^15), some back to back and some after idle gaps, and compares
// every output bin with a floating-point DFT divided by N, computed here
// independently. Also checks the bin index outputs against the bit-reversed
// order, the frame latency against the pipeline formula, and counts how often
// each mechanism of the design was exercised: back-to-back frames, frames
// after a gap, commutator crossing in stages 2..4, and rotator quarter-turn
// pre-rotation (twiddle angles beyond -90 degrees); one that never happened
// counts as a failure.
`timescale 1ns/1ps
module tb_r2mdc_fft;
  import fft_pkg::*;

  localparam int N    = 16;
  localparam int LOGN = 4;
  localparam int NF   = 40;
  localparam real PI  = 3.14159265358979323846;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  cplx_t       in_data = '0;
  logic        out_valid;
  cplx_t       out_pos, out_neg;
  logic [LOGN-1:0] out_bin_pos, out_bin_neg;

  r2mdc_fft dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_pos, .out_neg,
    .out_bin_pos, .out_bin_neg
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NF][N];
  int xi [NF][N];
  longint t_in [NF];
  longint t_out [NF];
  longint cyc = 0;
  int n_b2b = 0, n_gap = 0, n_prerot = 0;
  int n_cross [2:LOGN];
  real max_err = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- stimulus ----------------
  function automatic int rnd(input int amp);
    return int'($urandom_range(2 * amp, 0)) - amp;
  endfunction

  task automatic make_frame(input int f);
    int kind, bin, amp;
    real ph;
    kind = f % 5;
    bin  = int'($urandom_range(N - 1, 0));
    amp  = 2000 + int'($urandom_range(18000, 0));
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: begin xr[f][n] = (n == f % N) ? amp : 0; xi[f][n] = 0; end          // impulse
        1: begin xr[f][n] = amp; xi[f][n] = -amp / 2; end                       // DC
        2: begin                                                                // complex tone
             ph = 2.0 * PI * real'(bin * n) / real'(N);
             xr[f][n] = int'($rtoi(real'(amp) * $cos(ph)));
             xi[f][n] = int'($rtoi(real'(amp) * $sin(ph)));
           end
        3: begin                                                                // decaying burst
             ph = 2.0 * PI * real'(bin * n) / real'(N) + 0.3;
             xr[f][n] = $rtoi(real'(amp) * $exp(-real'(n) / 5.0) * $sin(ph));
             xi[f][n] = 0;
           end
        default: begin xr[f][n] = rnd(21000); xi[f][n] = rnd(21000); end       // random
      endcase
    end
  endtask

  initial begin
    int gap;
    for (int f = 0; f < NF; f++) make_frame(f);
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      gap = (f % 3 == 1) ? int'($urandom_range(20, 1)) : 0;
      if (f > 0) begin
        if (gap == 0) n_b2b++; else n_gap++;
      end
      repeat (gap) begin
        in_valid <= 1'b0;
        in_data  <= cplx_t'($urandom);
        @(posedge clk);
      end
      for (int n = 0; n < N; n++) begin
        in_valid   <= 1'b1;
        in_data.re <= sample_t'(xr[f][n]);
        in_data.im <= sample_t'(xi[f][n]);
        if (n == 0) t_in[f] = cyc + 1;  // the edge that takes the sample in
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // ---------------- mechanism counters (probe internal control) ----------------
  always @(posedge clk) if (rst_n) begin
    if (dut.g_stage[2].u_stage.sel && dut.g_stage[2].u_stage.bf_valid) n_cross[2]++;
    if (dut.g_stage[3].u_stage.sel && dut.g_stage[3].u_stage.bf_valid) n_cross[3]++;
    if (dut.g_stage[4].u_stage.sel && dut.g_stage[4].u_stage.bf_valid) n_cross[4]++;
    if (dut.g_stage[1].u_stage.bf_valid &&
        dut.g_stage[1].u_stage.g_tw.angle < -angle_t'(16384)) n_prerot++;
  end

  // ---------------- checker ----------------
  int of = 0, oc = 0;

  function automatic void ref_bin(input int f, input int k, output real re, output real im);
    real ph;
    re = 0.0; im = 0.0;
    for (int n = 0; n < N; n++) begin
      ph = -2.0 * PI * real'(k * n) / real'(N);
      re += real'(xr[f][n]) * $cos(ph) - real'(xi[f][n]) * $sin(ph);
      im += real'(xr[f][n]) * $sin(ph) + real'(xi[f][n]) * $cos(ph);
    end
    re = re / real'(N);
    im = im / real'(N);
  endfunction

  function automatic int brev(input int v);
    int r = 0;
    for (int i = 0; i < LOGN; i++) if (v & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  task automatic check_bin(input int f, input int k, input cplx_t got);
    real er, ei, tol, amp, e;
    amp = 0.0;
    for (int n = 0; n < N; n++) amp += $sqrt(real'(xr[f][n]) ** 2 + real'(xi[f][n]) ** 2);
    amp = amp / real'(N);
    tol = 6.0 + 0.008 * amp;
    ref_bin(f, k, er, ei);
    e = $sqrt((real'(got.re) - er) ** 2 + (real'(got.im) - ei) ** 2);
    if (e > max_err) max_err = e;
    checks++;
    if (e > tol) begin
      failures++;
      $display("FAIL frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f) err %0.1f tol %0.1f",
               f, k, got.re, got.im, er, ei, e, tol);
    end
  endtask

  localparam int CORDIC_LAT = 10 + 3;
  localparam int EXP_LAT = N/2 + N/4 + N/8 + N/16 + (LOGN - 1) * CORDIC_LAT + 1;

  always @(posedge clk) if (rst_n && out_valid && of < NF) begin
    if (oc == 0) begin
      t_out[of] = cyc;
      checks++;
      if (t_out[of] - t_in[of] != longint'(EXP_LAT)) begin
        failures++;
        $display("FAIL frame %0d latency %0d expected %0d", of, t_out[of] - t_in[of], EXP_LAT);
      end
    end
    checks++;
    if (int'(out_bin_pos) != brev(2 * oc) || int'(out_bin_neg) != brev(2 * oc + 1)) begin
      failures++;
      $display("FAIL frame %0d cycle %0d bins %0d/%0d", of, oc, out_bin_pos, out_bin_neg);
    end
    check_bin(of, brev(2 * oc), out_pos);
    check_bin(of, brev(2 * oc + 1), out_neg);
    if (oc == N / 2 - 1) begin oc = 0; of++; end
    else oc++;
  end

  task automatic need(input string what, input int cnt);
    checks++;
    $display("mechanism %-28s %0d", what, cnt);
    if (cnt == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    for (int s = 2; s <= LOGN; s++) n_cross[s] = 0;
    wait (of == NF);
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL output still valid after last frame"); end
    need("back-to-back frames", n_b2b);
    need("frames after a gap", n_gap);
    need("commutator cross stage 2", n_cross[2]);
    need("commutator cross stage 3", n_cross[3]);
    need("commutator cross stage 4", n_cross[4]);
    need("rotator quarter-turn", n_prerot);
    $display("largest bin error %0.2f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d frames seen", of, NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
