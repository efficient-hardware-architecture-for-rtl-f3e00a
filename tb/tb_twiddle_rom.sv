// tb_twiddle_rom: checks the angle tables of all four stages of a 16-point
// FFT. For stage s and index k the angle, read as a fraction of a turn, must
// give cos and sin equal to those of the twiddle W_16^(k*2^(s-1)) =
// exp(-j*2*pi*k*2^(s-1)/16), computed here in floating point.
`timescale 1ns/1ps
module tb_twiddle_rom;
  import fft_pkg::*;
  localparam int N = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  logic [2:0] addr;
  angle_t ang [1:4];
  int checks = 0, failures = 0;

  for (genvar s = 1; s <= 4; s++) begin : g_s
    twiddle_rom #(.N(N), .STAGE(s)) dut (.addr(addr), .angle(ang[s]));
  end
  always #5 clk = ~clk;

  initial begin
    real th, tw;
    for (int k = 0; k < N / 2; k++) begin
      addr = 3'(k);
      @(posedge clk);
      for (int s = 1; s <= 4; s++) begin
        if (k < (N >> s)) begin
          th = 2.0 * PI * real'(ang[s]) / 65536.0;
          tw = -2.0 * PI * real'(k * (1 << (s - 1))) / real'(N);
          checks++;
          if (($cos(th) - $cos(tw)) ** 2 + ($sin(th) - $sin(tw)) ** 2 > 1e-18) begin
            failures++;
            $display("FAIL stage %0d k %0d: angle %0d", s, k, ang[s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
