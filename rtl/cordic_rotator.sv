// cordic_rotator: pipelined, unrolled CORDIC that rotates a vector by an angle.
//
// Used as the twiddle multiplier of the FFT: (XOUT, YOUT) = (x_o, y_o) turned
// by w_in, i.e. the complex product (x_o + j*y_o) * exp(j*w_in), without any
// multiplier. Inside:
//   1. pre-rotation: an angle beyond +-90 degrees is first served by an exact
//      quarter turn ((x,y) -> (-y,x) or (y,-x)), so any angle of the full turn
//      falls in the CORDIC convergence range;
//   2. ITER micro-rotations (cordic_microrotation), one pipeline register each,
//      directions taken from the sign of the residual angle;
//   3. gain correction: both coordinates are multiplied by the inverse CORDIC
//      gain (0.607253 for 10 iterations) with the shift-add radix-2^r constant
//      multiplier;
//   4. output: the guard bits are rounded off and the result saturated to 16 bits.
// Inside, coordinates carry 2 extra integer bits (for the gain of 1.647 and
// the quarter turn) and CORDIC_GUARD extra fraction bits.
//
// Interface and timing: the port names follow the rotator drawn for the
// design (x_o, y_o, in_push, out_stall, reset -> XOUT, YOUT, in_stall,
// out_push_F); the angle input w_in is added because the rotation needs one.
// in_push marks a valid input. The pipeline is CORDIC_LATENCY = ITER + 3
// cycles deep and accepts one vector per cycle. When out_stall is high while
// out_push_F is high, the whole pipeline holds and in_stall goes high; an
// input pushed while in_stall is high is not taken. The meaning of the
// handshake signals, the pre-rotation and the saturation are this design's
// choices; the unrolled pipeline, the 10 iterations and the gain correction
// by a radix-2^r constant multiplication follow the design.
module cordic_rotator
  import fft_pkg::*;
#(
  parameter int ITER  = CORDIC_ITER,
  parameter int GUARD = CORDIC_GUARD
) (
  input  logic    clk,
  input  logic    reset,        // synchronous, active high
  input  logic    in_push,
  output logic    in_stall,
  input  sample_t x_o,
  input  sample_t y_o,
  input  angle_t  w_in,
  input  logic    out_stall,
  output logic    out_push_F,
  output sample_t XOUT,
  output sample_t YOUT
);

  localparam int IW = DW + 2 + GUARD;
  localparam angle_t QUARTER = angle_t'(1 << (AW - 2));   // 90 degrees

  typedef logic signed [IW-1:0] coord_t;

  logic advance;
  assign advance  = !(out_stall && out_push_F);
  assign in_stall = !advance;

  // ---------------- stage 0: widen and pre-rotate ----------------
  coord_t xi, yi, xp, yp;
  angle_t wp;
  always_comb begin
    xi = coord_t'(x_o) <<< GUARD;
    yi = coord_t'(y_o) <<< GUARD;
    if (w_in > QUARTER) begin            // more than +90 degrees: turn +90 first
      xp = -yi;
      yp = xi;
      wp = w_in - QUARTER;
    end else if (w_in < -QUARTER) begin  // less than -90 degrees: turn -90 first
      xp = yi;
      yp = -xi;
      wp = w_in + QUARTER;
    end else begin
      xp = xi;
      yp = yi;
      wp = w_in;
    end
  end

  // pipeline registers: index 0 after pre-rotation, index i+1 after micro-rotation i
  coord_t xr [ITER+1];
  coord_t yr [ITER+1];
  angle_t wr [ITER+1];
  logic   vr [ITER+1];

  always_ff @(posedge clk) begin
    if (reset)        vr[0] <= 1'b0;
    else if (advance) vr[0] <= in_push;
    if (advance) begin
      xr[0] <= xp;
      yr[0] <= yp;
      wr[0] <= wp;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_iter
    coord_t xn, yn;
    angle_t wn;
    cordic_microrotation #(
      .SHIFT (i),
      .ATAN  (cordic_atan(i)),
      .IW    (IW)
    ) u_rot (
      .x_in  (xr[i]),
      .y_in  (yr[i]),
      .w_in  (wr[i]),
      .x_out (xn),
      .y_out (yn),
      .w_out (wn)
    );
    always_ff @(posedge clk) begin
      if (reset)        vr[i+1] <= 1'b0;
      else if (advance) vr[i+1] <= vr[i];
      if (advance) begin
        xr[i+1] <= xn;
        yr[i+1] <= yn;
        wr[i+1] <= wn;
      end
    end
  end

  // ---------------- gain correction ----------------
  coord_t xg, yg, xs, ys;
  logic   vs;
  radix2r_const_mult #(.W(IW), .CONST(CORDIC_INV_GAIN_Q16), .FRAC(16), .R(4))
    u_kx (.x(xr[ITER]), .p(xg));
  radix2r_const_mult #(.W(IW), .CONST(CORDIC_INV_GAIN_Q16), .FRAC(16), .R(4))
    u_ky (.x(yr[ITER]), .p(yg));

  always_ff @(posedge clk) begin
    if (reset)        vs <= 1'b0;
    else if (advance) vs <= vr[ITER];
    if (advance) begin
      xs <= xg;
      ys <= yg;
    end
  end

  // ---------------- round off guard bits, saturate, register ----------------
  function automatic sample_t round_sat(input coord_t v);
    coord_t r;
    r = (v + (coord_t'(1) <<< (GUARD - 1))) >>> GUARD;
    if (r > coord_t'(2**(DW-1) - 1))   return sample_t'(2**(DW-1) - 1);
    if (r < -coord_t'(2**(DW-1)))      return sample_t'(-(2**(DW-1)));
    return sample_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (reset)        out_push_F <= 1'b0;
    else if (advance) out_push_F <= vs;
    if (advance) begin
      XOUT <= round_sat(xs);
      YOUT <= round_sat(ys);
    end
  end

  // an input offered while the pipeline is stalled is not taken: the
  // producer has to hold it, so it must still be there on the next cycle
  property p_hold_when_stalled;
    @(posedge clk) disable iff (reset)
      (in_push && in_stall) |=> in_push;
  endproperty
  a_hold_when_stalled: assert property (p_hold_when_stalled);

  // output is frozen while stalled
  property p_out_stable;
    @(posedge clk) disable iff (reset)
      (out_push_F && out_stall) |=> (out_push_F && $stable(XOUT) && $stable(YOUT));
  endproperty
  a_out_stable: assert property (p_out_stable);

endmodule
