// tb_lfsr_xor: self-checking testbench for the LFSR post-processing.
//
// The key stream of the 4-bit LFSR x^4 + x^3 + 1 from state 0001, worked
// out by hand, is 0,0,0,1,0,0,1,1,0,1,0,1,1,1,1 and repeats every 15 bits.
// Random raw bits are fed with gaps; each output must be raw XOR key, and
// the key must advance only on valid input bits.
`timescale 1ns / 1ps
module tb_lfsr_xor;
  logic clk = 1'b0, rst_n, in_bit, in_valid, out_bit, out_valid;
  int checks = 0, failures = 0;
  localparam logic [14:0] KEY = 15'b000100110101111;  // first key bit is the MSB

  lfsr_xor dut (.*);

  always #5 clk = ~clk;

  initial begin
    int k = 0;
    bit b;
    rst_n = 1'b1; #1 rst_n = 1'b0; in_bit = 1'b0; in_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      b = 1'($urandom);
      in_bit = b;
      @(negedge clk);
      checks++;
      if (out_valid != in_valid) begin failures++; $display("FAIL valid"); end
      if (in_valid) begin
        checks++;
        if (out_bit != (b ^ KEY[14 - k])) begin
          failures++;
          $display("FAIL bit %0d: in=%b out=%b key=%b", i, b, out_bit, KEY[14 - k]);
        end
        k = (k + 1) % 15;
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
