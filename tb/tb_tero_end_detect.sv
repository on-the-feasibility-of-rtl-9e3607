// tb_tero_end_detect: self-checking testbench for the OE detector.
//
// Each precharge period is 4 clock cycles: PRE in the first, EN in the last.
// The testbench decides per period whether TO rises after the precharge and
// whether Q[8] is set, and checks OE = 1 exactly when TO stayed quiet or the
// counter was saturated; TMO must force OE and OE_CLR must drop it.
`timescale 1ns / 1ps
module tb_tero_end_detect;
  logic clk = 1'b0, rst_n, to_clk, q_msb, pre, en, tmo, oe_clr, oe;
  int checks = 0, failures = 0;

  tero_end_detect dut (.*);

  always #5 clk = ~clk;

  task automatic period(bit edges, bit sat);
    bit exp_oe;
    @(negedge clk); pre = 1'b1; q_msb = sat;
    @(negedge clk); pre = 1'b0;
    if (edges) fork
      repeat (5) begin #1.5 to_clk = 1'b1; #1.5 to_clk = 1'b0; end
    join_none
    @(negedge clk);
    @(negedge clk); en = 1'b1;
    @(negedge clk); en = 1'b0;
    exp_oe = !edges || sat;
    checks++;
    if (oe != exp_oe) begin
      failures++;
      $display("FAIL edges=%b sat=%b: OE=%b", edges, sat, oe);
    end
  endtask

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; to_clk = 1'b0; q_msb = 1'b0; pre = 1'b1; en = 1'b0;
    tmo = 1'b0; oe_clr = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (oe != 1'b0) begin failures++; $display("FAIL OE after reset"); end
    period(1, 0);
    period(0, 0);
    period(1, 1);
    period(1, 0);
    for (int i = 0; i < 30; i++) period(1'($urandom), ($urandom_range(0, 3) == 0));
    // OE_CLR then TMO.
    period(0, 0);
    @(negedge clk); oe_clr = 1'b1;
    @(negedge clk); oe_clr = 1'b0;
    checks++;
    if (oe != 1'b0) begin failures++; $display("FAIL OE_CLR"); end
    @(negedge clk); tmo = 1'b1;
    @(negedge clk); tmo = 1'b0;
    checks++;
    if (oe != 1'b1) begin failures++; $display("FAIL TMO"); end
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
