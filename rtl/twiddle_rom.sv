// twiddle_rom: rotation angles of one FFT stage.
//
// The twiddle factor of butterfly k in stage STAGE (1-based) of an N-point
// radix-2 DIF FFT is W_N^m = exp(-j*2*pi*m/N) with m = k * 2^(STAGE-1).
// Because the twiddle multiplication is a CORDIC rotation, the ROM holds the
// rotation angle -2*pi*m/N rather than cosine and sine. In binary angle units
// (2^16 = one turn) that is exactly -m * 2^16 / N, so the table is computed
// while the design is elaborated: entry k = -(k << (STAGE-1)) * (2^16 / N).
// Holding angles, and the formula, are this design's reading of the ROM
// drawn beside the stage multiplier. Combinational read.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int N     = 16,
  parameter int STAGE = 1
) (
  input  logic [$clog2(N)-2:0] addr,   // butterfly index k, 0 .. N/2-1
  output angle_t               angle
);

  localparam int NK = N / 2;

  function automatic logic [NK*AW-1:0] build_table();
    logic [NK*AW-1:0] t;
    int m;
    t = '0;
    for (int k = 0; k < NK; k++) begin
      m = (k << (STAGE - 1)) % N;
      t[k*AW +: AW] = AW'(-(m * ((1 << AW) / N)));
    end
    return t;
  endfunction

  localparam logic [NK*AW-1:0] TABLE = build_table();

  assign angle = angle_t'(TABLE[addr*AW +: AW]);

endmodule
