// mdc_commutator: the switch of the multi-path delay commutator.
//
// Two multiplexers share one select line. With sel = 0 the two streams pass
// straight through (positive to positive, negative to negative); with
// sel = 1 they are crossed. Together with a delay of H samples before it on
// the negative path and after it on the positive path, this switch regroups
// the two output streams of one stage into the pairs, H samples apart, that
// the next stage's butterfly needs. The select polarity is this design's
// choice. Purely combinational.
module mdc_commutator
  import fft_pkg::*;
(
  input  logic  sel,
  input  cplx_t in_pos,
  input  cplx_t in_neg,
  output cplx_t out_pos,
  output cplx_t out_neg
);

  always_comb begin
    out_pos = sel ? in_neg : in_pos;
    out_neg = sel ? in_pos : in_neg;
  end

endmodule
