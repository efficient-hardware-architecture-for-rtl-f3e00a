// tb_radix2r_const_mult: checks the shift-add constant multiplier against
// round(x * CONST / 2^FRAC) computed with 64-bit integers, for the inverse
// CORDIC gain with R = 4 and for a second constant with R = 3.
`timescale 1ns/1ps
module tb_radix2r_const_mult;
  localparam int W = 22;
  logic clk = 1'b0;
  logic signed [W-1:0] x, x2, p1, p2;
  int checks = 0, failures = 0;

  radix2r_const_mult #(.W(W), .CONST(39797), .FRAC(16), .R(4)) dut1 (.x(x), .p(p1));
  radix2r_const_mult #(.W(W), .CONST(54321), .FRAC(15), .R(3)) dut2 (.x(x2), .p(p2));
  always #5 clk = ~clk;

  function automatic longint expect_p(input longint xv, input longint c, input int frac);
    longint prod;
    prod = xv * c + (longint'(1) << (frac - 1));
    return prod >>> frac;
  endfunction

  initial begin
    for (int i = 0; i < 600; i++) begin
      case (i)
        0: x = '0;
        1: x = 22'sh1fffff;
        2: x = -22'sh100000;
        3: x = -22'sd1;
        default: x = W'($urandom);
      endcase
      x2 = x >>> 1;   // keeps x * 1.66 inside W bits
      @(posedge clk);
      checks += 2;
      if (longint'(p1) != expect_p(longint'(x), 39797, 16)) begin
        failures++;
        $display("FAIL x=%0d p1=%0d expected %0d", x, p1, expect_p(longint'(x), 39797, 16));
      end
      if (longint'(p2) != expect_p(longint'(x2), 54321, 15)) begin
        failures++;
        $display("FAIL x2=%0d p2=%0d expected %0d", x2, p2, expect_p(longint'(x2), 54321, 15));
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
