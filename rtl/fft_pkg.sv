// fft_pkg: types and constants shared by the R2MDC FFT and its CORDIC rotators.
//
// Samples are complex words with 16-bit two's-complement real and imaginary
// parts (the width printed on the rotator's ports). Angles are "binary angle"
// words: a 16-bit two's-complement value where 2^16 is one full turn, so
// -32768 is -180 degrees and 16384 is +90 degrees. With this unit every FFT
// twiddle angle -2*pi*m/N is an exact integer and angle arithmetic wraps for free.
//
// The rotator runs 10 micro-rotations, the count used by the design. The
// arctangent table atan(2^-i) (in binary angle units, rounded) and the inverse
// CORDIC gain 1/prod(sqrt(1+2^-2i)) = 0.607253 (as round(0.607253 * 2^16)) are
// constants of this package.
package fft_pkg;

  localparam int DW = 16;  // sample word width (real or imaginary part)
  localparam int AW = 16;  // angle width, 2^AW = one turn

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [AW-1:0] angle_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  localparam int CORDIC_ITER  = 10;  // micro-rotations
  localparam int CORDIC_GUARD = 4;   // extra fraction bits inside the rotator
  // pre-rotation register + one register per micro-rotation + gain register + output register
  localparam int CORDIC_LATENCY = CORDIC_ITER + 3;

  // round(2^16 / 1.6467592), inverse gain of a 10-iteration CORDIC, 16 fraction bits
  localparam int CORDIC_INV_GAIN_Q16 = 39797;

  // atan(2^-i) * 2^16 / (2*pi), rounded to the nearest integer
  function automatic angle_t cordic_atan(input int i);
    case (i)
      0:  return angle_t'(8192);
      1:  return angle_t'(4836);
      2:  return angle_t'(2555);
      3:  return angle_t'(1297);
      4:  return angle_t'(651);
      5:  return angle_t'(326);
      6:  return angle_t'(163);
      7:  return angle_t'(81);
      8:  return angle_t'(41);
      9:  return angle_t'(20);
      10: return angle_t'(10);
      11: return angle_t'(5);
      12: return angle_t'(3);
      13: return angle_t'(1);
      default: return angle_t'(1);
    endcase
  endfunction

  // bit-reverse the low 'bits' bits of v
  function automatic int bitrev(input int v, input int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

endpackage
