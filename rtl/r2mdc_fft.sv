// r2mdc_fft: N-point radix-2 decimation-in-frequency FFT, multi-path delay
// commutator (R2MDC) pipeline, with CORDIC twiddle rotation.
//
// One complex sample enters per clock; a frame is N samples on consecutive
// cycles (frames may follow each other directly or with gaps). The log2(N)
// stages (r2mdc_stage) are chained: stage 1 splits the serial frame into the
// first and second half with an N/2-deep shift register, each later stage
// regroups the two streams of the one before with delays of H = N/2^s and a
// commutator. Every butterfly but the last stage's is followed by a CORDIC
// rotator that applies the twiddle factor, so the pipeline has no general
// multiplier and no RAM: log2(N)-1 rotators, 2*log2(N) adders in butterflies
// and 1.5N-2 words of commutator delay (plus the delay that matches each sum
// path to its rotator).
// Output: two bins per clock for N/2 consecutive cycles per frame, in
// bit-reversed order. In output cycle c of a frame out_pos holds bin
// bitrev(2c) and out_neg bin bitrev(2c+1) (bins 0,8 then 4,12, 2,10 ... for
// N = 16); out_bin_pos/out_bin_neg give these indices. Every butterfly halves
// its results, so the outputs are the DFT divided by N. Inputs must stay in
// the disk |x| <= 2^15 - 1 for the rotators never to saturate.
// Latency from the clock edge that takes the first sample of a frame to the
// edge that presents its first output pair:
// N/2 + sum_{s=2..log2 N} N/2^s + (log2 N - 1) * CORDIC_LATENCY + 1
// = N + (log2 N - 1) * CORDIC_LATENCY cycles (55 for N = 16).
// The 16-point, four-stage R2MDC structure, CORDIC twiddles with 10
// iterations and radix-2^r gain correction follow the design; scaling by 1/2
// per stage, the frame and valid conventions and the bin-index outputs are
// this design's choices.
module r2mdc_fft
  import fft_pkg::*;
#(
  parameter int N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,       // synchronous, active low
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_pos,
  output cplx_t                out_neg,
  output logic [$clog2(N)-1:0] out_bin_pos,
  output logic [$clog2(N)-1:0] out_bin_neg
);

  localparam int LOGN = $clog2(N);

  logic  v   [LOGN+1];
  cplx_t pos [LOGN+1];
  cplx_t neg [LOGN+1];

  assign v[0]   = in_valid;
  assign pos[0] = in_data;
  assign neg[0] = in_data;

  for (genvar s = 1; s <= LOGN; s++) begin : g_stage
    r2mdc_stage #(
      .N           (N),
      .STAGE       (s),
      .HAS_TWIDDLE (s < LOGN)
    ) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v[s-1]),
      .in_pos    (pos[s-1]),
      .in_neg    (neg[s-1]),
      .out_valid (v[s]),
      .out_pos   (pos[s]),
      .out_neg   (neg[s])
    );
  end

  // output cycle counter within a frame -> bit-reversed bin indices
  logic [LOGN-2:0] ocnt;
  always_ff @(posedge clk) begin
    if (!rst_n)     ocnt <= '0;
    else if (v[LOGN]) ocnt <= ocnt + 1'b1;
  end

  always_comb begin
    for (int i = 0; i < LOGN; i++) begin
      // bin = bit-reverse of {ocnt, lsb}: lsb 0 for the sum stream, 1 for the difference
      out_bin_pos[LOGN-1-i] = (i == 0) ? 1'b0 : ocnt[i-1];
      out_bin_neg[LOGN-1-i] = (i == 0) ? 1'b1 : ocnt[i-1];
    end
  end

  assign out_valid = v[LOGN];
  assign out_pos   = pos[LOGN];
  assign out_neg   = neg[LOGN];

endmodule
