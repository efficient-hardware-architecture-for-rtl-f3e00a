// cordic_microrotation: one micro-rotation of a rotation-mode CORDIC.
//
// Rotates (x, y) by +atan(2^-SHIFT) or -atan(2^-SHIFT) using only an
// arithmetic shift and an add or subtract per coordinate, and takes the
// rotated angle off the residual angle w. The direction comes from the sign
// of w: for w >= 0 the vector turns counter-clockwise and w decreases, for
// w < 0 the opposite. Repeated with SHIFT = 0, 1, 2, ... the residual angle
// goes to zero and the vector ends up turned by the starting angle, scaled
// by the CORDIC gain. This is the "coordinate unit" of the rotator;
// combinational, the caller adds the pipeline register.
module cordic_microrotation
  import fft_pkg::*;
#(
  parameter int     SHIFT = 0,      // iteration index i, shift amount 2^-i
  parameter angle_t ATAN  = 8192,   // atan(2^-i) in binary angle units
  parameter int     IW    = 22      // internal coordinate width
) (
  input  logic signed [IW-1:0] x_in,
  input  logic signed [IW-1:0] y_in,
  input  angle_t               w_in,
  output logic signed [IW-1:0] x_out,
  output logic signed [IW-1:0] y_out,
  output angle_t               w_out
);

  logic signed [IW-1:0] xs, ys;

  always_comb begin
    xs = x_in >>> SHIFT;
    ys = y_in >>> SHIFT;
    if (w_in >= 0) begin
      x_out = x_in - ys;
      y_out = y_in + xs;
      w_out = w_in - ATAN;
    end else begin
      x_out = x_in + ys;
      y_out = y_in - xs;
      w_out = w_in + ATAN;
    end
  end

endmodule
