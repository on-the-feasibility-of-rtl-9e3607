// tb_tero_cnt_reg: self-checking testbench for the CNT output register.
//
// Random counter values are applied; CNT must follow D one clock later
// while SET is low, and read 0xff as soon as SET (Q[8]) rises, without
// waiting for a clock edge.
`timescale 1ns / 1ps
module tb_tero_cnt_reg;
  logic clk = 1'b0, set;
  logic [7:0] d, cnt, exp_cnt;
  int checks = 0, failures = 0;

  tero_cnt_reg dut (.clk(clk), .set(set), .d(d), .cnt(cnt));

  always #5 clk = ~clk;

  initial begin
    set = 1'b0;
    d = 8'h00;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 8'($urandom);
      exp_cnt = d;
      @(posedge clk); #1;
      checks++;
      if (cnt != exp_cnt) begin failures++; $display("FAIL d=%02h cnt=%02h", exp_cnt, cnt); end
      if ($urandom_range(0, 7) == 0) begin
        #1 set = 1'b1;
        #1;
        checks++;
        if (cnt != 8'hff) begin failures++; $display("FAIL SET: cnt=%02h", cnt); end
        @(posedge clk); #1;
        checks++;
        if (cnt != 8'hff) begin failures++; $display("FAIL SET held: cnt=%02h", cnt); end
        set = 1'b0;
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
