// tb_tc_ro: self-checking testbench for the TC-RO behavioural model.
//
// For a set of configurations the ring is held with CTRL = 0 (ROOut must sit
// at 1), then started; the period between two rising edges of ROOut is
// measured and compared with twice the delay of the selected path, summed
// here element by element from the element delays of the package.
`timescale 1ns / 1ps
module tb_tc_ro;
  import tero_pkg::*;
  localparam int unsigned STAGES = 4;

  logic                ctrl;
  logic [2*STAGES-1:0] rosel;
  logic                roout;
  int checks = 0, failures = 0;
  realtime t0, t1;

  tc_ro #(.STAGES(STAGES)) dut (.ctrl(ctrl), .rosel(rosel), .roout(roout));

  // Path delay computed directly: for stage j, the element in use is the
  // upper or lower copy picked by the next stage's even bit, plus the F7MUX
  // in front of stage j when bit 2j+1 is set.
  function automatic real expected_half(logic [2*STAGES-1:0] s);
    real t = 0.0;
    for (int j = 0; j < STAGES; j++) begin
      int nxt = (j + 1) % STAGES;
      t += elem_delay(1, 0, j, s[2*nxt] ? EL_LOWER : EL_UPPER, 0.5, 0.3, 0.25);
      if (s[2*j+1]) t += elem_delay(1, 0, j, EL_F7, 0.5, 0.3, 0.25);
    end
    return t;
  endfunction

  task automatic run_case(logic [2*STAGES-1:0] s);
    real exp_per, got_per;
    ctrl = 1'b0;
    rosel = s;
    #30;
    checks++;
    if (roout !== 1'b1) begin
      failures++;
      $display("FAIL rosel=%02h: ROOut=%b while stopped", s, roout);
    end
    ctrl = 1'b1;
    repeat (3) @(posedge roout);
    t0 = $realtime;
    @(posedge roout);
    t1 = $realtime;
    exp_per = 2.0 * expected_half(s);
    got_per = t1 - t0;
    checks++;
    if (got_per < exp_per - 0.02 || got_per > exp_per + 0.02) begin
      failures++;
      $display("FAIL rosel=%02h: period %.3f ns, expected %.3f ns", s, got_per, exp_per);
    end else
      $display("rosel=%02h period %.3f ns (expected %.3f)", s, got_per, exp_per);
  endtask

  initial begin
    ctrl = 1'b0;
    rosel = '0;
    run_case(8'h00);
    run_case(8'hff);
    run_case(8'haa);
    run_case(8'h55);
    run_case(8'h0f);
    run_case(8'hc3);
    for (int i = 0; i < 10; i++) run_case(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
