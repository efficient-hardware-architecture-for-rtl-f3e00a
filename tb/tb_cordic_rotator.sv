// tb_cordic_rotator: checks the pipelined CORDIC rotator.
// Random vectors (inside the disk of radius 32000) and random angles over the
// whole turn are pushed, first one per cycle with no back-pressure, then
// with random out_stall and an input side that waits while in_stall is high.
// Each output is compared with the rotation (x + jy) * exp(j*w) computed in
// floating point (tolerance 0.4% of the magnitude + 3 LSB, the accuracy of 10
// micro-rotations); outputs must come in input order, and with no stall
// every output must appear exactly 13 cycles after its input.
`timescale 1ns/1ps
module tb_cordic_rotator;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  NV = 600;
  localparam int  LAT = 10 + 3;

  logic clk = 1'b0, reset = 1'b1;
  logic in_push = 1'b0, in_stall, out_stall = 1'b0, out_push_F;
  sample_t x_o = '0, y_o = '0, XOUT, YOUT;
  angle_t w_in = '0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_stalled = 0;

  cordic_rotator dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int x; int y; int w; longint t; } item_t;
  item_t q [$];
  int nout = 0;
  bit stall_phase = 1'b0;

  initial begin
    item_t it;
    real r, a;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int i = 0; i < NV; i++) begin
      if (i == NV / 2) stall_phase = 1'b1;
      r = 32000.0 * $sqrt(real'($urandom_range(10000, 0)) / 10000.0);
      a = 2.0 * PI * real'($urandom_range(9999, 0)) / 10000.0;
      it.x = $rtoi(r * $cos(a));
      it.y = $rtoi(r * $sin(a));
      it.w = int'(angle_t'($urandom));
      if (i < 4) it.w = int'(angle_t'(16'sh8000 + i * 16'sh4000));  // -180, -90, 0, +90
      in_push <= 1'b1;
      x_o <= sample_t'(it.x);
      y_o <= sample_t'(it.y);
      w_in <= angle_t'(it.w);
      @(posedge clk);
      while (in_stall) @(posedge clk);
      it.t = cyc;
      q.push_back(it);
      if (stall_phase && $urandom_range(3, 0) == 0) begin
        in_push <= 1'b0;
        @(posedge clk);
      end
    end
    in_push <= 1'b0;
  end

  always @(posedge clk) out_stall <= stall_phase && ($urandom_range(2, 0) == 0);
  always @(posedge clk) if (out_push_F && out_stall) n_stalled++;

  always @(posedge clk) if (!reset && out_push_F && !out_stall) begin
    item_t it;
    real th, ex, ey, e, mag;
    it = q.pop_front();
    th  = 2.0 * PI * real'(it.w) / 65536.0;
    ex  = real'(it.x) * $cos(th) - real'(it.y) * $sin(th);
    ey  = real'(it.x) * $sin(th) + real'(it.y) * $cos(th);
    mag = $sqrt(real'(it.x) ** 2 + real'(it.y) ** 2);
    e   = $sqrt((real'(XOUT) - ex) ** 2 + (real'(YOUT) - ey) ** 2);
    checks++;
    if (e > 3.0 + 0.004 * mag) begin
      failures++;
      $display("FAIL in (%0d,%0d) w %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
               it.x, it.y, it.w, XOUT, YOUT, ex, ey);
    end
    if (!stall_phase || nout < NV / 2 - LAT) begin
      checks++;
      if (cyc - it.t != longint'(LAT)) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cyc - it.t, LAT);
      end
    end
    nout++;
  end

  initial begin
    wait (nout == NV);
    repeat (3) @(posedge clk);
    checks++;
    if (n_stalled == 0) begin failures++; $display("FAIL stall never exercised"); end
    $display("outputs held by out_stall: %0d cycles", n_stalled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
