// tb_tero_ctrl: self-checking testbench for the control circuit.
//
// A small stand-in for the end detector drives OE: it sets OE on TMO, or at
// EN once the testbench declares the ring stopped, and clears it on OE_CLR.
// Checked: CTRL and CLR sequencing, PRE every 40 ns with EN 30 ns after it,
// one VALID per sample with CTRL already low, and the 2 us timeout measured
// from the rise of CTRL to the forced OE.
`timescale 1ns / 1ps
module tb_tero_ctrl;
  logic clk = 1'b0, rst_n, enable, oe;
  logic ctrl, clr, pre, en, tmo, oe_clr, valid, timed_out;
  bit   stopped;
  int checks = 0, failures = 0;
  int n_valid = 0, n_tmo_samples = 0;
  realtime t_ctrl, t_pre_last, t_pre;

  tero_ctrl dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) oe <= 1'b0;
    else if (tmo) oe <= 1'b1;
    else if (oe_clr) oe <= 1'b0;
    else if (en && stopped) oe <= 1'b1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", msg, $realtime); end
  endtask

  always @(posedge ctrl) begin
    t_ctrl = $realtime;
    t_pre_last = $realtime;  // PRE is already high in the first cycle
  end
  always @(posedge pre) if (ctrl) begin
    t_pre = $realtime;
    check(t_pre - t_pre_last == 40.0, "PRE period not 40 ns");
    t_pre_last = t_pre;
  end
  always @(posedge en) check(ctrl && $realtime - t_pre_last == 30.0, "EN not 30 ns after PRE");
  always @(posedge oe) if (ctrl && !stopped)
    check($realtime - t_ctrl == 2000.0, $sformatf("timeout after %.0f ns", $realtime - t_ctrl));
  always @(posedge clk) if (valid) begin
    n_valid++;
    if (timed_out) n_tmo_samples++;
    check(!ctrl, "CTRL high during VALID");
    check(!clr, "counter cleared during VALID");
  end
  always @(posedge clk) if (ctrl) check(!clr, "CLR high while running");

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; enable = 1'b0; stopped = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(!ctrl && clr && pre, "idle outputs");
    enable = 1'b1;
    // Samples that end on their own after a random time.
    for (int i = 0; i < 10; i++) begin
      stopped = 1'b0;
      @(posedge ctrl);
      #(real'($urandom_range(50, 1500)));
      stopped = 1'b1;
      @(posedge valid);
      check(!timed_out, "natural end flagged as timeout");
      @(negedge clk);
    end
    // A sample that never ends.
    stopped = 1'b0;
    @(posedge ctrl);
    @(posedge valid);
    #1;
    check(timed_out, "timeout not flagged");
    enable = 1'b0;
    repeat (20) @(negedge clk);
    check(!ctrl, "CTRL high after ENABLE fell");
    check(n_valid == 11, $sformatf("%0d samples, expected 11", n_valid));
    check(n_tmo_samples == 1, "timeout sample count");
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
