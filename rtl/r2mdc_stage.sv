// r2mdc_stage: one stage of the radix-2 multi-path delay commutator FFT.
//
// Stage STAGE pairs samples H = N / 2^STAGE apart, adds and subtracts them
// in the butterfly, and turns the difference by its twiddle factor
// W_N^(k*2^(STAGE-1)) in a CORDIC rotator whose angle comes from the stage's
// twiddle ROM.
//   Stage 1: one serial input stream (drive in_pos and in_neg with the same
//   sample). An N/2-deep shift register, shifting on in_valid, holds the
//   first half of the frame so that sample k meets sample k + N/2.
//   Later stages: the two streams of the previous stage arrive together.
//   The negative stream is delayed by H, the commutator then swaps the
//   streams in the second half of every 2H-cycle block, and the positive
//   stream is delayed by H again; the butterfly then sees pairs (k, k+H) of
//   the sum sub-sequence followed by pairs of the difference sub-sequence.
//   These delays run freely so the last pairs drain after the input ends.
// With HAS_TWIDDLE = 0 (last stage, twiddle 1) the rotator is left out.
// The delay and commutator arrangement follows the R2MDC stage; where this
// design cuts the modules differs: the delay after the previous stage's
// multiplier and the commutator are placed at the input of the next stage.
// The sum path is delayed by the rotator latency to stay aligned with the
// difference path (this design's choice).
// Timing: out_valid follows bf_valid by CORDIC_LATENCY cycles (1 cycle when
// HAS_TWIDDLE = 0), for N/2 consecutive cycles per frame.
module r2mdc_stage
  import fft_pkg::*;
#(
  parameter int N           = 16,
  parameter int STAGE       = 1,
  parameter bit HAS_TWIDDLE = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_pos,
  input  cplx_t in_neg,
  output logic  out_valid,
  output cplx_t out_pos,
  output cplx_t out_neg
);

  localparam int LOGN = $clog2(N);
  localparam int H    = N >> STAGE;
  localparam int CW   = $bits(cplx_t);

  logic                 sel, bf_valid;
  logic [LOGN-2:0]      tw_addr;
  cplx_t                bf_a, bf_b, bf_sum, bf_diff;

  stage_controller #(.N(N), .STAGE(STAGE)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .sel      (sel),
    .bf_valid (bf_valid),
    .tw_addr  (tw_addr)
  );

  if (STAGE == 1) begin : g_in_first
    shift_register #(.DEPTH(N / 2), .W(CW)) u_sr_pos (
      .clk (clk), .en (in_valid), .din (in_pos), .dout (bf_a)
    );
    assign bf_b = in_neg;
  end else begin : g_in_mdc
    cplx_t neg_d, sw_pos, sw_neg;
    shift_register #(.DEPTH(H), .W(CW)) u_sr_neg (
      .clk (clk), .en (1'b1), .din (in_neg), .dout (neg_d)
    );
    mdc_commutator u_comm (
      .sel     (sel),
      .in_pos  (in_pos),
      .in_neg  (neg_d),
      .out_pos (sw_pos),
      .out_neg (sw_neg)
    );
    shift_register #(.DEPTH(H), .W(CW)) u_sr_pos (
      .clk (clk), .en (1'b1), .din (sw_pos), .dout (bf_a)
    );
    assign bf_b = sw_neg;
  end

  butterfly u_bf (
    .a    (bf_a),
    .b    (bf_b),
    .sum  (bf_sum),
    .diff (bf_diff)
  );

  if (HAS_TWIDDLE) begin : g_tw
    angle_t  angle;
    logic    rot_valid, rot_in_stall;
    sample_t rot_x, rot_y;
    cplx_t   sum_d;

    twiddle_rom #(.N(N), .STAGE(STAGE)) u_rom (
      .addr  (tw_addr),
      .angle (angle)
    );

    cordic_rotator u_rot (
      .clk        (clk),
      .reset      (!rst_n),
      .in_push    (bf_valid),
      .in_stall   (rot_in_stall),
      .x_o        (bf_diff.re),
      .y_o        (bf_diff.im),
      .w_in       (angle),
      .out_stall  (1'b0),
      .out_push_F (rot_valid),
      .XOUT       (rot_x),
      .YOUT       (rot_y)
    );

    shift_register #(.DEPTH(CORDIC_LATENCY), .W(CW)) u_sum_delay (
      .clk (clk), .en (1'b1), .din (bf_sum), .dout (sum_d)
    );

    assign out_valid  = rot_valid;
    assign out_pos    = sum_d;
    assign out_neg.re = rot_x;
    assign out_neg.im = rot_y;

    // the rotator never stalls here: its out_stall is tied low
    a_no_stall: assert property (@(posedge clk) disable iff (!rst_n) !rot_in_stall);
  end else begin : g_no_tw
    always_ff @(posedge clk) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= bf_valid;
      out_pos <= bf_sum;
      out_neg <= bf_diff;
    end
  end

endmodule
