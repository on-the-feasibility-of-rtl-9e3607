// tb_tc_tero_trng_full: the TRNG at its default parameters, with a sweep of
// its 20-bit configuration.
//
// The generator is instantiated without parameter overrides. For each of
// NCFG random configurations, NS samples are taken; every CNT is compared
// with the TO rising edges counted here, every raw bit with the LSB of its
// sample and every whitened bit with raw XOR the LFSR key stream. Per
// configuration the mean and standard deviation of CNT and whether 0xff
// occurred are collected, and configurations are sorted as the published
// evaluation does: mean below 96, mean in 96..127 with no saturation (a good
// entropy source), or otherwise. The achieved raw bit rate is reported.
// The standalone TC-RO of the top runs meanwhile and must oscillate.
`timescale 1ns / 1ps
module tb_tc_tero_trng_full;
  import tero_pkg::*;

  localparam logic [14:0] KEY = 15'b000100110101111;
  localparam int NCFG = 256;
  localparam int NS   = 64;

  logic clk = 1'b0, rst_n, enable;
  logic [SEL_W-1:0] rosel;
  logic [7:0] cnt;
  logic oe, cnt_valid, timed_out, raw_bit, raw_valid, rnd_bit, rnd_valid;
  logic tcro_ctrl, tcro_out;
  logic [2*S1-1:0] tcro_sel;
  int n_tcro_edges = 0;
  always @(posedge tcro_out) n_tcro_edges++;
  int checks = 0, failures = 0;

  tc_tero_trng dut (.*);

  always #5 clk = ~clk;

  int rises = 0;
  always @(posedge dut.ring_ctrl) rises = 0;
  always @(posedge dut.to) if (dut.ring_ctrl) rises++;

  int k_idx = 0, n_samples = 0, n_raw = 0, n_rnd = 0, n_sat = 0, n_tmo = 0;
  logic last_lsb = 1'b0, last_raw = 1'b0;
  real sum, sq;
  bit  sat_seen;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", msg, $realtime); end
  endtask

  always @(posedge clk) begin
    if (cnt_valid) begin
      n_samples++;
      if (timed_out) n_tmo++;
      else check(cnt == 8'((rises >= 256) ? 255 : rises),
                 $sformatf("CNT=%0d, TO rose %0d times", cnt, rises));
      if (cnt == 8'hff) begin n_sat++; sat_seen = 1'b1; end
      sum += real'(cnt);
      sq  += real'(cnt) * real'(cnt);
      last_lsb = cnt[0];
    end
    if (raw_valid) begin
      n_raw++;
      check(raw_bit == last_lsb, "raw bit");
      last_raw = raw_bit;
    end
    if (rnd_valid) begin
      n_rnd++;
      check(rnd_bit == (last_raw ^ KEY[14 - k_idx]), "whitened bit");
      k_idx = (k_idx + 1) % 15;
    end
  end

  initial begin
    int n_small = 0, n_good = 0, n_other = 0, got;
    logic [SEL_W-1:0] cfg;
    real mean, sd;
    realtime t0;
    rst_n = 1'b1; #1 rst_n = 1'b0;
    enable = 1'b0;
    rosel = SEL_W'($urandom);
    // The standalone TC-RO runs throughout with one configuration.
    tcro_sel = 8'($urandom);
    tcro_ctrl = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t0 = $realtime;
    for (int c = 0; c < NCFG; c++) begin
      sum = 0.0; sq = 0.0; sat_seen = 1'b0;
      got = n_samples;
      enable = 1'b1;
      wait (n_samples == got + NS);
      // The ring is stopped while CNT_VALID is high; change the
      // configuration before the next start.
      cfg = rosel;
      if (c + 1 < NCFG) rosel = SEL_W'($urandom);
      mean = sum / real'(NS);
      sd = $sqrt(sq / real'(NS) - mean * mean);
      if (mean < 96.0) n_small++;
      else if (mean < 128.0 && !sat_seen) n_good++;
      else n_other++;
      if (c < 8) $display("config %05h: mean %.2f sd %.2f saturated %b", cfg, mean, sd, sat_seen);
    end
    enable = 1'b0;
    repeat (300) @(negedge clk);
    $display("%0d configurations: %0d small, %0d in 96..127 unsaturated, %0d large or saturated",
             NCFG, n_small, n_good, n_other);
    $display("%0d samples, %0d saturated, %0d timeouts, %0d raw bits, %.3f Mbit/s raw",
             n_samples, n_sat, n_tmo, n_raw, 1000.0 * real'(n_raw) / ($realtime - t0));
    check(n_samples == NCFG * NS, "sample count");
    check(n_raw == n_samples - n_sat - n_tmo, "raw bits = unsaturated samples");
    check(n_rnd == n_raw, "whitened bit count");
    check(n_tcro_edges > 1000, "TC-RO did not oscillate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
