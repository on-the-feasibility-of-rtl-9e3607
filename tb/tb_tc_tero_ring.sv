// tb_tc_tero_ring: self-checking testbench for the TC-TERO ring model.
//
// Instance D has no jitter: its number of oscillations, the widths of the
// first '0' and '1' pulses (tau1, tau2) and its resting level are computed
// here and compared exactly. Instance S uses the default jitter; the mean of
// its oscillation count over many starts must lie near the noiseless count
// and the counts must spread.
`timescale 1ns / 1ps
module tb_tc_tero_ring;
  import tero_pkg::*;

  logic             ctrl_d, ctrl_s;
  logic [SEL_W-1:0] rosel;
  logic             to_d, to_s;
  int checks = 0, failures = 0;
  int rises_d, rises_s;

  tc_tero_ring #(.SIGMA_R(0.0)) dut_d (.ctrl(ctrl_d), .rosel(rosel), .to(to_d));
  tc_tero_ring                  dut_s (.ctrl(ctrl_s), .rosel(rosel), .to(to_s));

  always @(posedge to_d) if (ctrl_d) rises_d++;
  always @(posedge to_s) if (ctrl_s) rises_s++;

  function automatic real t1_of(logic [SEL_W-1:0] s);
    return chain_delay(1, 0, S1, 32'(s[2*S1-1:0]), s[2*S1], 0.5, 0.3, 0.25);
  endfunction
  function automatic real t2_of(logic [SEL_W-1:0] s);
    return chain_delay(1, 1, S2, 32'(s[SEL_W-1:2*S1]), s[0], 0.5, 0.3, 0.25);
  endfunction

  // Number of oscillations without jitter: count k >= 0 with |d0*R^k| < 1.
  function automatic int n_osc(real d0);
    int n = 0;
    real d = d0;
    while (d < 1.0 && d > -1.0 && n < 100000) begin
      n++;
      d = 1.01908 * d;
    end
    return n;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic det_case(logic [SEL_W-1:0] s);
    real t1, t2, d0, tf, tr, tf2;
    int exp_n;
    rosel = s;
    ctrl_d = 1'b0;
    #20;
    check(to_d == 1'b1, "TO not at rest while CTRL=0");
    t1 = t1_of(s);
    t2 = t2_of(s);
    d0 = (t2 - t1) / (t1 + t2);
    exp_n = n_osc(d0);
    rises_d = 0;
    ctrl_d = 1'b1;
    @(negedge to_d); tf = $realtime;
    @(posedge to_d); tr = $realtime;
    @(negedge to_d); tf2 = $realtime;
    check((tr - tf) > t1 - 0.003 && (tr - tf) < t1 + 0.003,
          $sformatf("rosel=%05h first low %.3f ns, tau1 %.3f", s, tr - tf, t1));
    check((tf2 - tr) > t2 - 0.003 && (tf2 - tr) < t2 + 0.003,
          $sformatf("rosel=%05h first high %.3f ns, tau2 %.3f", s, tf2 - tr, t2));
    #(real'(exp_n + 5) * (t1 + t2) + 10.0);
    check(rises_d == exp_n,
          $sformatf("rosel=%05h oscillations %0d, expected %0d (d0=%.4f)", s, rises_d, exp_n, d0));
    check(to_d == (d0 > 0.0), $sformatf("rosel=%05h resting level %b", s, to_d));
    $display("rosel=%05h tau1=%.3f tau2=%.3f d0=%.4f n=%0d", s, t1, t2, d0, rises_d);
    ctrl_d = 1'b0;
    #10;
    check(to_d == 1'b1, "TO did not return to 1 after CTRL fell");
  endtask

  initial begin
    logic [SEL_W-1:0] s;
    real d0, sum, sq, mean, sd;
    int exp_n, found;
    ctrl_d = 1'b0;
    ctrl_s = 1'b0;
    rosel = '0;
    // Noiseless cases: a range of paths, both signs of d0.
    found = 0;
    for (int i = 0; i < 2000 && found < 8; i++) begin
      s = SEL_W'($urandom);
      d0 = (t2_of(s) - t1_of(s)) / (t1_of(s) + t2_of(s));
      if ((d0 > 0.02 || d0 < -0.02) && (d0 < 0.9 && d0 > -0.9)) begin
        det_case(s);
        found++;
      end
    end
    check(found == 8, "not enough test configurations");
    // Jitter: a positive d0 near the nominal 0.1..0.3.
    s = '0;
    for (int i = 0; i < 5000; i++) begin
      s = SEL_W'($urandom);
      d0 = (t2_of(s) - t1_of(s)) / (t1_of(s) + t2_of(s));
      if (d0 > 0.1 && d0 < 0.3) break;
    end
    rosel = s;
    exp_n = n_osc(d0);
    sum = 0.0;
    sq = 0.0;
    for (int k = 0; k < 200; k++) begin
      ctrl_s = 1'b0;
      #20;
      rises_s = 0;
      ctrl_s = 1'b1;
      #(real'(exp_n * 2 + 20) * (t1_of(s) + t2_of(s)));
      sum += real'(rises_s);
      sq += real'(rises_s) * real'(rises_s);
    end
    mean = sum / 200.0;
    sd = $sqrt(sq / 200.0 - mean * mean);
    $display("jitter: rosel=%05h d0=%.4f mean=%.2f sd=%.2f noiseless=%0d", s, d0, mean, sd, exp_n);
    check(mean > 0.9 * real'(exp_n) && mean < 1.1 * real'(exp_n), "jitter mean off");
    check(sd > 0.5 && sd < 0.3 * real'(exp_n), "jitter spread off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
