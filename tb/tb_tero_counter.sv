// tb_tero_counter: self-checking testbench for the 9-bit oscillation counter.
//
// Bursts of TO pulses of random length are applied after an asynchronous
// clear; the count must equal the number of pulses up to 256 and then hold
// at 256 with Q[8] set.
`timescale 1ns / 1ps
module tb_tero_counter;
  logic       to_clk, clr;
  logic [8:0] q;
  int checks = 0, failures = 0;

  tero_counter dut (.to_clk(to_clk), .clr(clr), .q(q));

  task automatic burst(int n);
    int exp_q;
    clr = 1'b0;
    #1 clr = 1'b1;
    #2;
    checks++;
    if (q != 9'd0) begin failures++; $display("FAIL clear: q=%0d", q); end
    clr = 1'b0;
    #1;
    for (int i = 0; i < n; i++) begin
      to_clk = 1'b1; #1.2;
      to_clk = 1'b0; #1.8;
    end
    exp_q = (n >= 256) ? 256 : n;
    checks++;
    if (q != 9'(exp_q)) begin
      failures++;
      $display("FAIL %0d pulses: q=%0d expected %0d", n, q, exp_q);
    end
    checks++;
    if (q[8] != (n >= 256)) begin failures++; $display("FAIL Q[8] after %0d pulses", n); end
  endtask

  initial begin
    to_clk = 1'b0;
    clr = 1'b1;
    burst(0);
    burst(1);
    burst(112);
    burst(255);
    burst(256);
    burst(257);
    burst(600);
    for (int i = 0; i < 20; i++) burst(int'($urandom_range(0, 400)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
