// tb_cordic_microrotation: checks one micro-rotation (SHIFT = 3) for both
// signs of the residual angle against the shift-add rule worked out with
// floor division: x' = x -/+ floor(y/8), y' = y +/- floor(x/8), w' = w -/+ atan(1/8).
`timescale 1ns/1ps
module tb_cordic_microrotation;
  import fft_pkg::*;
  localparam int IW = 22;
  localparam int SH = 3;
  localparam int AT = 1297;
  logic clk = 1'b0;
  logic signed [IW-1:0] x_in, y_in, x_out, y_out;
  angle_t w_in, w_out;
  int checks = 0, failures = 0;

  cordic_microrotation #(.SHIFT(SH), .ATAN(angle_t'(AT)), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    int d, ex, ey, ew;
    for (int i = 0; i < 400; i++) begin
      x_in = IW'(int'($urandom_range(1 << 20, 0)) - (1 << 19));
      y_in = IW'(int'($urandom_range(1 << 20, 0)) - (1 << 19));
      w_in = angle_t'($urandom);
      @(posedge clk);
      d  = (w_in >= 0) ? 1 : -1;
      ex = int'(x_in) - d * int'($floor(real'(y_in) / 8.0));
      ey = int'(y_in) + d * int'($floor(real'(x_in) / 8.0));
      ew = int'(w_in) - d * AT;
      checks++;
      if (int'(x_out) != ex || int'(y_out) != ey || w_out != angle_t'(ew)) begin
        failures++;
        $display("FAIL x %0d y %0d w %0d -> %0d %0d %0d expected %0d %0d %0d",
                 x_in, y_in, w_in, x_out, y_out, w_out, ex, ey, ew);
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
