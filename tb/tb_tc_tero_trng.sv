// tb_tc_tero_trng: end-to-end testbench of the TC-TERO TRNG.
//
// Three generators run side by side on one 100 MHz clock:
//   A  default parameters; its 20-bit configuration is picked so the ring
//      stops after a moderate number of oscillations (normal samples).
//   B  amplification R = 1 and no jitter: the ring never stops, the counter
//      saturates and CNT reads 0xff (the sample must be dropped).
//   C  as B with a ring of about 15 ns period: still fast enough for the
//      end detector, but the counter cannot reach 256 in 2 us, so the
//      timeout must end the sample.
// For every sample CNT is compared with the number of TO rising edges seen
// by the testbench, each raw bit with the sample's LSB and each output bit
// with raw XOR the hand-computed LFSR key stream. The time per sample of A
// is checked against the oscillation time plus the controller overhead.
// Each mechanism (natural end, saturation, drop, timeout, bit output) is
// counted and must occur. Meanwhile the standalone TC-RO of A is run with 8
// configurations and its period checked against the selected path delay.
`timescale 1ns / 1ps
module tb_tc_tero_trng;
  import tero_pkg::*;

  localparam logic [14:0] KEY = 15'b000100110101111;
  localparam int NA = 60;

  logic clk = 1'b0, rst_n, enable;
  logic [SEL_W-1:0] rosel_a, rosel_b, rosel_c;
  int checks = 0, failures = 0;

  logic [7:0] cnt [3];
  logic oe [3], cnt_valid [3], timed_out [3], raw_bit [3], raw_valid [3];
  logic rnd_bit [3], rnd_valid [3];
  logic tcro_ctrl;
  logic [2*S1-1:0] tcro_sel;
  logic [2:0] tcro_out;
  int n_tcro = 0;

  // Standalone TC-RO of generator A: its period must be twice the delay of
  // the selected path.
  task automatic tcro_case(logic [2*S1-1:0] sel);
    realtime ta, tb;
    real exp_per;
    tcro_ctrl = 1'b0;
    tcro_sel = sel;
    #30;
    check(tcro_out[0] == 1'b1, "TC-RO output not at rest");
    tcro_ctrl = 1'b1;
    repeat (3) @(posedge tcro_out[0]);
    ta = $realtime;
    @(posedge tcro_out[0]);
    tb = $realtime;
    exp_per = 2.0 * chain_delay(1, 0, S1, 32'(sel), sel[0], 0.5, 0.3, 0.25);
    check(tb - ta > exp_per - 0.02 && tb - ta < exp_per + 0.02,
          $sformatf("TC-RO sel=%02h period %.3f, expected %.3f", sel, tb - ta, exp_per));
    n_tcro++;
    tcro_ctrl = 1'b0;
  endtask

  tc_tero_trng dut_a (
    .clk, .rst_n, .enable, .rosel(rosel_a), .cnt(cnt[0]), .oe(oe[0]),
    .cnt_valid(cnt_valid[0]), .timed_out(timed_out[0]), .raw_bit(raw_bit[0]),
    .raw_valid(raw_valid[0]), .rnd_bit(rnd_bit[0]), .rnd_valid(rnd_valid[0]),
    .tcro_ctrl(tcro_ctrl), .tcro_sel(tcro_sel), .tcro_out(tcro_out[0]));
  tc_tero_trng #(.R(1.0), .SIGMA_R(0.0)) dut_b (
    .clk, .rst_n, .enable, .rosel(rosel_b), .cnt(cnt[1]), .oe(oe[1]),
    .cnt_valid(cnt_valid[1]), .timed_out(timed_out[1]), .raw_bit(raw_bit[1]),
    .raw_valid(raw_valid[1]), .rnd_bit(rnd_bit[1]), .rnd_valid(rnd_valid[1]),
    .tcro_ctrl(tcro_ctrl), .tcro_sel(tcro_sel), .tcro_out(tcro_out[1]));
  tc_tero_trng #(.R(1.0), .SIGMA_R(0.0), .LUT_NS(1.5), .F7_NS(0.9)) dut_c (
    .clk, .rst_n, .enable, .rosel(rosel_c), .cnt(cnt[2]), .oe(oe[2]),
    .cnt_valid(cnt_valid[2]), .timed_out(timed_out[2]), .raw_bit(raw_bit[2]),
    .raw_valid(raw_valid[2]), .rnd_bit(rnd_bit[2]), .rnd_valid(rnd_valid[2]),
    .tcro_ctrl(tcro_ctrl), .tcro_sel(tcro_sel), .tcro_out(tcro_out[2]));

  always #5 clk = ~clk;

  // Reference: TO rising edges while the ring is enabled.
  int rises [3];
  logic [2:0] to_v, ctrl_v;
  assign to_v   = {dut_c.to, dut_b.to, dut_a.to};
  assign ctrl_v = {dut_c.ring_ctrl, dut_b.ring_ctrl, dut_a.ring_ctrl};
  for (genvar g = 0; g < 3; g++) begin : g_ref
    always @(posedge ctrl_v[g]) rises[g] = 0;
    always @(posedge to_v[g]) if (ctrl_v[g]) rises[g]++;
  end

  int n_natural [3], n_sat [3], n_tmo [3], n_raw [3], n_rnd [3], n_drop [3];
  int k_idx [3];
  logic last_lsb [3];
  logic last_raw [3];
  realtime t_start_a, t_prev_valid_a;
  real sum_samples_ns;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", msg, $realtime); end
  endtask

  always @(posedge dut_a.ring_ctrl) t_start_a = $realtime;

  for (genvar g = 0; g < 3; g++) begin : g_chk
    always @(posedge clk) begin
      if (cnt_valid[g]) begin
        int exp_cnt;
        exp_cnt = (rises[g] >= 256) ? 255 : rises[g];
        if (!timed_out[g])
          check(cnt[g] == 8'(exp_cnt), $sformatf("gen %0d: CNT=%0d, TO rose %0d times", g, cnt[g], rises[g]));
        else
          check(rises[g] < 256, $sformatf("gen %0d: timeout although counter saturated", g));
        if (timed_out[g]) n_tmo[g]++;
        else if (cnt[g] == 8'hff) n_sat[g]++;
        else n_natural[g]++;
        if (timed_out[g] || cnt[g] == 8'hff) n_drop[g]++;
        last_lsb[g] = cnt[g][0];
        if (g == 0) begin
          // Sample time: oscillation, up to two precharge periods to notice
          // the end, the idle time and the handshake.
          check($realtime - t_start_a <= real'(rises[0] + 2) * 12.0 + 80.0 + 40.0,
                $sformatf("sample took %.0f ns for %0d oscillations", $realtime - t_start_a, rises[0]));
          if (t_prev_valid_a != 0) sum_samples_ns += $realtime - t_prev_valid_a;
          t_prev_valid_a = $realtime;
        end
      end
      if (raw_valid[g]) begin
        n_raw[g]++;
        check(raw_bit[g] == last_lsb[g], $sformatf("gen %0d: raw bit", g));
        last_raw[g] = raw_bit[g];
      end
      if (rnd_valid[g]) begin
        n_rnd[g]++;
        check(rnd_bit[g] == (last_raw[g] ^ KEY[14 - k_idx[g]]), $sformatf("gen %0d: whitened bit", g));
        k_idx[g] = (k_idx[g] + 1) % 15;
      end
    end
  end

  function automatic real d0_of(logic [SEL_W-1:0] s);
    real t1, t2;
    t1 = chain_delay(1, 0, S1, 32'(s[2*S1-1:0]), s[2*S1], 0.5, 0.3, 0.25);
    t2 = chain_delay(1, 1, S2, 32'(s[SEL_W-1:2*S1]), s[0], 0.5, 0.3, 0.25);
    return (t2 - t1) / (t1 + t2);
  endfunction

  initial begin
    real d;
    for (int g = 0; g < 3; g++) begin
      n_natural[g] = 0; n_sat[g] = 0; n_tmo[g] = 0; n_raw[g] = 0; n_rnd[g] = 0;
      n_drop[g] = 0; k_idx[g] = 0; rises[g] = 0; last_lsb[g] = 0; last_raw[g] = 0;
    end
    t_prev_valid_a = 0;
    sum_samples_ns = 0.0;
    rosel_a = '0;
    for (int i = 0; i < 10000; i++) begin
      rosel_a = SEL_W'($urandom);
      d = d0_of(rosel_a);
      if (d > 0.12 && d < 0.2) break;
    end
    rosel_b = '0;
    rosel_c = '0;
    tcro_ctrl = 1'b0;
    tcro_sel = '0;
    rst_n = 1'b1; #1 rst_n = 1'b0;
    enable = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    for (int i = 0; i < 8; i++) tcro_case(8'($urandom));
    wait (n_natural[0] + n_sat[0] >= NA);
    enable = 1'b0;
    repeat (300) @(negedge clk);
    $display("A: rosel=%05h d0=%.4f natural=%0d sat=%0d raw=%0d rnd=%0d, %.1f ns per sample (%.2f Mbit/s raw)",
             rosel_a, d, n_natural[0], n_sat[0], n_raw[0], n_rnd[0],
             sum_samples_ns / real'(n_natural[0] + n_sat[0] - 1),
             1000.0 * real'(n_natural[0] + n_sat[0] - 1) / sum_samples_ns);
    $display("B: saturated=%0d dropped=%0d raw=%0d", n_sat[1], n_drop[1], n_raw[1]);
    $display("C: timeouts=%0d dropped=%0d raw=%0d", n_tmo[2], n_drop[2], n_raw[2]);
    check(n_natural[0] >= NA / 2, "natural end of oscillation never seen");
    check(n_raw[0] == n_natural[0], "raw bit count of A");
    check(n_rnd[0] == n_raw[0], "whitened bit count of A");
    check(n_sat[1] > 0, "saturation never happened");
    check(n_drop[1] == n_sat[1] + n_tmo[1] && n_raw[1] == 0, "saturated samples not dropped");
    check(n_tmo[2] > 0, "timeout never happened");
    check(n_tcro == 8, "TC-RO not exercised");
    check(n_raw[2] == 0, "timed-out samples not dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
