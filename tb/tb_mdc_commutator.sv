// tb_mdc_commutator: checks straight (sel=0) and crossed (sel=1) routing
// of the commutator with random words.
`timescale 1ns/1ps
module tb_mdc_commutator;
  import fft_pkg::*;
  logic clk = 1'b0, sel;
  cplx_t in_pos, in_neg, out_pos, out_neg;
  int checks = 0, failures = 0;

  mdc_commutator dut (.sel, .in_pos, .in_neg, .out_pos, .out_neg);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = i[0] ^ i[3];
      in_pos = cplx_t'($urandom);
      in_neg = cplx_t'($urandom);
      @(posedge clk);
      checks++;
      if (sel ? (out_pos !== in_neg || out_neg !== in_pos)
              : (out_pos !== in_pos || out_neg !== in_neg)) begin
        failures++;
        $display("FAIL sel=%0d", sel);
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
