// tb_stage_controller: checks the control sequences of stages 1, 2 and 4 of
// a 16-point R2MDC FFT. Stage 1 gets 16-sample frames; stages 2 and 4 get
// 8-cycle valid bursts, back to back or after gaps. Expected values follow
// from the data flow: stage 1 pairs are valid for samples 8..15 with k =
// sample - 8; for a later stage with span H and a burst starting at t0, the
// butterfly is valid for t0+H .. t0+H+7, k = (t - t0 - H) mod H, and the
// commutator crosses when ((t - t0) / H) is odd.
`timescale 1ns/1ps
module tb_stage_controller;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic v1 = 1'b0, v2 = 1'b0, v4 = 1'b0;
  logic s1, s2, s4, b1, b2, b4;
  logic [2:0] k1, k2, k4;
  int checks = 0, failures = 0;
  longint cyc = 0;

  stage_controller #(.N(N), .STAGE(1)) u1 (.clk, .rst_n, .in_valid(v1), .sel(s1), .bf_valid(b1), .tw_addr(k1));
  stage_controller #(.N(N), .STAGE(2)) u2 (.clk, .rst_n, .in_valid(v2), .sel(s2), .bf_valid(b2), .tw_addr(k2));
  stage_controller #(.N(N), .STAGE(4)) u4 (.clk, .rst_n, .in_valid(v4), .sel(s4), .bf_valid(b4), .tw_addr(k4));

  always #5 clk = ~clk;

  // drive: frames / bursts with gaps 0..5 between them
  longint start2 [$], start4 [$];
  int n1 = 0;   // sample index within the stage-1 frame
  int cnt1 = 0, cnt2 = 0, cnt4 = 0, gap1 = 0, gap2 = 0, gap4 = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v4 <= 1'b0;
    end else begin
      // stage 1 source: 16 valid then a random gap
      if (cnt1 < 16) begin v1 <= 1'b1; cnt1++; end
      else if (gap1 > 0) begin v1 <= 1'b0; gap1--; end
      else begin v1 <= 1'b1; cnt1 = 1; end
      if (cnt1 == 16 && gap1 == 0 && v1) gap1 = $urandom_range(5, 0);
      // stage 2 source: 8 valid then at least 8 idle
      if (gap2 > 0) begin v2 <= 1'b0; gap2--; end
      else begin
        v2 <= 1'b1;
        if (cnt2 == 0) start2.push_back(cyc + 1);
        cnt2++;
        if (cnt2 == 8) begin cnt2 = 0; gap2 = 8 + $urandom_range(4, 0); end
      end
      // stage 4 source: 8 valid then at least 8 idle
      if (gap4 > 0) begin v4 <= 1'b0; gap4--; end
      else begin
        v4 <= 1'b1;
        if (cnt4 == 0) start4.push_back(cyc + 1);
        cnt4++;
        if (cnt4 == 8) begin cnt4 = 0; gap4 = 8 + $urandom_range(6, 0); end
      end
    end
  end

  task automatic chk(input string nm, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 60) $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, nm, got, exp_v);
    end
  endtask

  function automatic void later(input longint starts[$], input int H, output int ev, output int ek, output int es);
    longint t;
    ev = 0; ek = 0; es = 0;
    foreach (starts[i]) begin
      t = cyc - starts[i];
      if (t >= 0 && t < H + 8) begin
        es = int'((t / H) % 2);
        if (t >= H) begin ev = 1; ek = int'((t - H) % H); end
      end
    end
  endfunction

  always @(posedge clk) if (rst_n) begin
    int ev, ek, es;
    // stage 1
    chk("b1", int'(b1), int'(v1 && n1 >= 8));
    if (v1 && n1 >= 8) chk("k1", int'(k1), n1 - 8);
    if (v1) n1 = (n1 + 1) % 16;
    // stage 2
    later(start2, 4, ev, ek, es);
    chk("b2", int'(b2), ev);
    if (ev) begin chk("k2", int'(k2), ek); end
    if (ev || v2) chk("s2", int'(s2), es);
    // stage 4
    later(start4, 1, ev, ek, es);
    chk("b4", int'(b4), ev);
    if (ev) begin chk("k4", int'(k4), ek); end
    if (ev || v4) chk("s4", int'(s4), es);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (600) @(posedge clk);
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
