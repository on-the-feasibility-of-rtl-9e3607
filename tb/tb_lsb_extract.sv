// tb_lsb_extract: self-checking testbench for the raw-bit extractor.
//
// Random samples, some saturated (0xff) and some marked as timed out, are
// presented; a bit must come out one cycle later exactly for the others, and
// it must equal the sample's LSB.
`timescale 1ns / 1ps
module tb_lsb_extract;
  logic clk = 1'b0, rst_n, valid, timed_out, bit_out, bit_valid;
  logic [7:0] cnt;
  int checks = 0, failures = 0;

  lsb_extract dut (.*);

  always #5 clk = ~clk;

  initial begin
    bit exp_v, exp_b;
    rst_n = 1'b1; #1 rst_n = 1'b0; valid = 1'b0; cnt = '0; timed_out = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 1) == 1);
      cnt = ($urandom_range(0, 4) == 0) ? 8'hff : 8'($urandom);
      timed_out = ($urandom_range(0, 9) == 0);
      exp_v = valid && (cnt != 8'hff) && !timed_out;
      exp_b = cnt[0];
      @(negedge clk);
      valid = 1'b0;
      checks++;
      if (bit_valid != exp_v || (exp_v && bit_out != exp_b)) begin
        failures++;
        $display("FAIL cnt=%02h to=%b: valid=%b bit=%b", cnt, timed_out, bit_valid, bit_out);
      end
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
