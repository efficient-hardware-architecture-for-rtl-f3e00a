// shift_register: enabled delay line of DEPTH words.
//
// These are the "shift registers" of the multi-path delay commutator
// pipeline: they hold one data stream back by DEPTH samples so that it meets
// the matching samples of the other stream at the butterfly. When 'en' is
// high the word on 'din' enters and every stored word moves one place on;
// 'dout' is the word that entered DEPTH enabled cycles earlier. When 'en' is
// low nothing moves. The enable input follows the "Enable 1 / Enable 2"
// inputs drawn on the stage's shift registers; the data registers have no
// reset (they are read only after being filled), which is this design's choice.
module shift_register #(
  parameter int DEPTH = 8,   // words of delay (N/2 for the first stage of a 16-point FFT)
  parameter int W     = 32   // word width (one complex sample)
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      mem[0] <= din;
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
    end
  end

  assign dout = mem[DEPTH-1];

endmodule
