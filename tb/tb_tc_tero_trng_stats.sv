// tb_tc_tero_trng_stats: counter statistics and bit quality of the TRNG.
//
// Part 1 (one good parameter, default generator): a configuration whose
// noiseless oscillation count is near 112 is chosen and NS samples are
// taken. Checked: every CNT against the TO edges counted here; the mean
// within 10 % of the noiseless count ln(1/d0)/ln(R); a non-zero spread; the
// share of samples at or below the median near one half; the share of ones
// in the raw and in the whitened stream within 0.5 +/- 0.05. The bit rate
// is reported.
// Part 2 (placements): four generators that differ only in SEED, i.e. in
// where the ring's elements landed, run one fixed configuration; their mean
// and deviation are reported side by side and must not all be equal.
`timescale 1ns / 1ps
module tb_tc_tero_trng_stats;
  import tero_pkg::*;

  localparam int NS = 4096;
  localparam int NP = 4;
  localparam int NSP = 512;

  logic clk = 1'b0, rst_n, enable;
  logic [SEL_W-1:0] rosel;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", msg, $realtime); end
  endtask

  always #5 clk = ~clk;

  // ---------------- Part 1 ----------------
  logic [7:0] cnt;
  logic oe, cnt_valid, timed_out, raw_bit, raw_valid, rnd_bit, rnd_valid;
  logic tcro_out;
  tc_tero_trng dut (
    .clk, .rst_n, .enable, .rosel, .cnt, .oe, .cnt_valid, .timed_out,
    .raw_bit, .raw_valid, .rnd_bit, .rnd_valid,
    .tcro_ctrl(1'b0), .tcro_sel(8'h00), .tcro_out(tcro_out));

  int rises = 0;
  always @(posedge dut.ring_ctrl) rises = 0;
  always @(posedge dut.to) if (dut.ring_ctrl) rises++;

  int hist [256];
  int n_s = 0, n_raw = 0, n_raw1 = 0, n_rnd = 0, n_rnd1 = 0;
  real sum = 0.0, sq = 0.0;
  always @(posedge clk) begin
    if (cnt_valid && n_s < NS) begin
      check(timed_out || cnt == 8'((rises >= 256) ? 255 : rises), "CNT against TO edges");
      hist[cnt]++;
      sum += real'(cnt);
      sq += real'(cnt) * real'(cnt);
      n_s++;
    end
    if (raw_valid) begin n_raw++; if (raw_bit) n_raw1++; end
    if (rnd_valid) begin n_rnd++; if (rnd_bit) n_rnd1++; end
  end

  // ---------------- Part 2 ----------------
  logic [7:0] p_cnt [NP];
  logic p_valid [NP], p_to [NP];
  logic p_unused [NP][6];
  real p_sum [NP], p_sq [NP];
  int  p_n [NP];
  for (genvar g = 0; g < NP; g++) begin : g_place
    tc_tero_trng #(.SEED(g + 2)) u (
      .clk, .rst_n, .enable, .rosel(20'h00000), .cnt(p_cnt[g]), .oe(p_unused[g][0]),
      .cnt_valid(p_valid[g]), .timed_out(p_to[g]), .raw_bit(p_unused[g][1]),
      .raw_valid(p_unused[g][2]), .rnd_bit(p_unused[g][3]), .rnd_valid(p_unused[g][4]),
      .tcro_ctrl(1'b0), .tcro_sel(8'h00), .tcro_out(p_unused[g][5]));
    int r = 0;
    always @(posedge u.ring_ctrl) r = 0;
    always @(posedge u.to) if (u.ring_ctrl) r++;
    always @(posedge clk) if (p_valid[g] && p_n[g] < NSP) begin
      check(p_to[g] || p_cnt[g] == 8'((r >= 256) ? 255 : r), $sformatf("placement %0d CNT", g));
      p_sum[g] += real'(p_cnt[g]);
      p_sq[g] += real'(p_cnt[g]) * real'(p_cnt[g]);
      p_n[g]++;
    end
  end

  function automatic real d0_of(logic [SEL_W-1:0] s);
    real t1, t2;
    t1 = chain_delay(1, 0, S1, 32'(s[2*S1-1:0]), s[2*S1], 0.5, 0.3, 0.25);
    t2 = chain_delay(1, 1, S2, 32'(s[SEL_W-1:2*S1]), s[0], 0.5, 0.3, 0.25);
    return (t2 - t1) / (t1 + t2);
  endfunction

  initial begin
    real d0, mean, sd, exp_n, below;
    realtime t0;
    int acc, median;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    for (int g = 0; g < NP; g++) begin p_sum[g] = 0.0; p_sq[g] = 0.0; p_n[g] = 0; end
    rosel = '0;
    d0 = 0.0;
    for (int i = 0; i < 20000; i++) begin
      rosel = SEL_W'($urandom);
      d0 = d0_of(rosel);
      if (d0 > 0.112 && d0 < 0.120) break;
    end
    exp_n = $ln(1.0 / d0) / $ln(1.01908);
    rst_n = 1'b1; #1 rst_n = 1'b0;
    enable = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    t0 = $realtime;
    wait (n_s == NS);
    mean = sum / real'(NS);
    sd = $sqrt(sq / real'(NS) - mean * mean);
    acc = 0;
    median = 0;
    for (int i = 0; i < 256; i++) begin
      acc += hist[i];
      if (acc * 2 >= NS) begin median = i; break; end
    end
    below = real'(acc) / real'(NS);
    $display("parameter %05h d0=%.4f: %0d samples, mean %.2f sd %.2f (noiseless %.1f), median %0d, P(cnt<=median)=%.4f",
             rosel, d0, NS, mean, sd, exp_n, median, below);
    $display("raw ones %0d/%0d, whitened ones %0d/%0d, %.3f Mbit/s raw",
             n_raw1, n_raw, n_rnd1, n_rnd, 1000.0 * real'(n_raw) / ($realtime - t0));
    check(mean > 0.9 * exp_n && mean < 1.1 * exp_n, "mean count");
    check(sd > 1.0 && sd < 20.0, "count spread");
    check(below >= 0.5 && below < 0.6, "median share");
    check(n_raw > NS * 9 / 10, "raw bits");
    check(real'(n_raw1) / real'(n_raw) > 0.45 && real'(n_raw1) / real'(n_raw) < 0.55, "raw bias");
    check(real'(n_rnd1) / real'(n_rnd) > 0.45 && real'(n_rnd1) / real'(n_rnd) < 0.55, "whitened bias");
    wait (p_n[0] >= NSP && p_n[1] >= NSP && p_n[2] >= NSP && p_n[3] >= NSP);
    for (int g = 0; g < NP; g++)
      $display("placement SEED=%0d, parameter 00000: mean %.2f sd %.2f", g + 2,
               p_sum[g] / real'(NSP), $sqrt(p_sq[g] / real'(NSP) - (p_sum[g] / real'(NSP)) ** 2));
    check(p_sum[0] != p_sum[1] || p_sum[1] != p_sum[2] || p_sum[2] != p_sum[3], "placements all equal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
