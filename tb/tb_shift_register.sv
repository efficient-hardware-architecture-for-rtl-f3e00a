// tb_shift_register: checks the enabled delay line against a queue model.
// Random data and a random enable; on every clock the output must equal the
// word that entered DEPTH enabled cycles before (checked once filled).
`timescale 1ns/1ps
module tb_shift_register;
  localparam int DEPTH = 8;
  localparam int W     = 32;
  logic clk = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0, filled = 0;
  logic [W-1:0] q [$];

  shift_register #(.DEPTH(DEPTH), .W(W)) dut (.clk, .en, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 400; i++) begin
      en  <= ($urandom_range(3, 0) != 0);
      din <= $urandom;
      @(posedge clk);
      if (en) begin q.push_back(din); filled++; if (q.size() > DEPTH) void'(q.pop_front()); end
      #1;
      if (filled >= DEPTH) begin
        checks++;
        if (dout !== q[0]) begin
          failures++;
          $display("FAIL cycle %0d: dout %h expected %h", i, dout, q[0]);
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
