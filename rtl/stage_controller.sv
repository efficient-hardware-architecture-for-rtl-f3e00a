// stage_controller: control signals of one R2MDC stage.
//
// Stage STAGE (1-based) of an N-point radix-2 DIF FFT pairs samples that lie
// H = N / 2^STAGE apart. The controller produces, each cycle:
//   bf_valid - the two words at the butterfly form a valid pair,
//   tw_addr  - the butterfly index k (0 .. H-1) that selects the twiddle angle,
//   sel      - the commutator setting (0 straight, 1 crossed).
// Stage 1 receives one serial frame of N samples; it counts the valid inputs
// modulo N, and the butterfly is valid while samples N/2 .. N-1 arrive
// (k = sample index - N/2). Later stages receive N/2 consecutive valid pairs
// per frame. A counter t starts at 0 on the first valid pair of a frame and
// runs to H + N/2 - 1 even when the input has gone idle, because the last
// pairs leave the delay lines after the input ends. Then sel = bit log2(H)
// of t (crossed in the second half of every 2H-cycle block), the butterfly
// is valid for H <= t < H + N/2, and k = t mod H. A frame may follow the
// previous one directly or after any gap, but each frame must arrive on
// consecutive cycles; assertions check both rules. The counter scheme is
// this design's own; the data flow it follows is that of the R2MDC pipeline.
module stage_controller #(
  parameter int N     = 16,
  parameter int STAGE = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,     // synchronous, active low
  input  logic                 in_valid,
  output logic                 sel,
  output logic                 bf_valid,
  output logic [$clog2(N)-2:0] tw_addr
);

  localparam int LOGN = $clog2(N);
  localparam int H    = N >> STAGE;
  localparam int LOGH = $clog2(H);
  localparam int CW   = LOGN + 1;
  localparam int LAST = H + N / 2;     // t runs 0 .. LAST-1

  if (STAGE == 1) begin : g_first
    logic [LOGN-1:0] n;
    always_ff @(posedge clk) begin
      if (!rst_n)        n <= '0;
      else if (in_valid) n <= n + 1'b1;
    end
    assign sel      = 1'b0;
    assign bf_valid = in_valid && n[LOGN-1];
    assign tw_addr  = n[LOGN-2:0];

    // a frame is N consecutive valid samples: no gap once a frame has begun
    a_frame_contiguous: assert property (
      @(posedge clk) disable iff (!rst_n) (n != '0) |-> in_valid);
  end else begin : g_later
    logic [CW-1:0] cnt, t;
    logic          busy, active;
    always_comb begin
      t      = busy ? cnt : '0;
      active = busy || in_valid;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        cnt  <= '0;
        busy <= 1'b0;
      end else if (active) begin
        cnt  <= t + 1'b1;
        busy <= (int'(t) + 1) < LAST;
      end
    end
    assign sel      = t[LOGH];
    assign bf_valid = active && (int'(t) >= H) && (int'(t) < LAST);
    // the N/2 pairs of a frame arrive on consecutive cycles, and the next
    // frame does not start before this one has left the butterfly
    a_burst_contiguous: assert property (
      @(posedge clk) disable iff (!rst_n) (busy && int'(t) < N / 2) |-> in_valid);
    a_no_early_frame: assert property (
      @(posedge clk) disable iff (!rst_n) (busy && int'(t) >= N / 2) |-> !in_valid);

    if (LOGH == 0) begin : g_h1
      assign tw_addr = '0;
    end else begin : g_hn
      assign tw_addr = (LOGN-1)'(t[LOGH-1:0]);
    end
  end

endmodule
