// butterfly: radix-2 decimation-in-frequency butterfly on complex samples.
//
// Forms u(i)+u(i+I/2) and u(i)-u(i+I/2), the two outputs of the DIF
// butterfly; the difference then goes on to the twiddle rotator. Both
// results are halved (arithmetic shift right, rounding toward minus
// infinity) so that they fit the 16-bit word whatever the inputs: a full
// N-point transform therefore comes out scaled by 1/N. The halving is this
// design's choice, not part of the textbook butterfly. Purely combinational.
module butterfly
  import fft_pkg::*;
(
  input  cplx_t a,     // u(i)
  input  cplx_t b,     // u(i + I/2)
  output cplx_t sum,   // (a + b) / 2
  output cplx_t diff   // (a - b) / 2
);

  logic signed [DW:0] s_re, s_im, d_re, d_im;

  always_comb begin
    s_re = (DW+1)'(a.re) + (DW+1)'(b.re);
    s_im = (DW+1)'(a.im) + (DW+1)'(b.im);
    d_re = (DW+1)'(a.re) - (DW+1)'(b.re);
    d_im = (DW+1)'(a.im) - (DW+1)'(b.im);
    sum.re  = sample_t'(s_re >>> 1);
    sum.im  = sample_t'(s_im >>> 1);
    diff.re = sample_t'(d_re >>> 1);
    diff.im = sample_t'(d_im >>> 1);
  end

endmodule
