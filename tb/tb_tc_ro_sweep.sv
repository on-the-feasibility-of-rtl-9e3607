// tb_tc_ro_sweep: frequency configurability of the TC-RO over every parameter.
//
// Four TC-RO instances with 8-bit parameters (three buffers plus the NAND
// stage) stand for four placements; each gets its own SEED, so its elements
// have different delays. For all 256 parameter values the four rings are
// started together and the time for NOSC rising edges of ROOut is measured.
// Checks:
//   * every mean period equals twice the selected path delay, summed here
//     element by element from the package's delay function, to 10 ps (each
//     element delay is rounded to the 1 ps time precision);
//   * per placement the frequencies are widely spread: the fastest setting
//     is at least 1.5x the slowest, and at least half of the 256 settings
//     give distinct periods (to 1 ps), so the parameter really tunes the ring.
// The minimum, quartiles and maximum of each placement's frequencies are
// printed as a box-plot summary.
// The full sweep of 2^8 parameters per placement follows the published
// evaluation of the TC-RO; NOSC = 1000 (instead of a much longer count) is
// chosen here because the model has no drift and the mean settles at once.
`timescale 1ns / 1ps
module tb_tc_ro_sweep;
  import tero_pkg::*;
  localparam int unsigned STAGES = S1;
  localparam int unsigned NPL    = 4;  // the fork below starts one measure per placement
  localparam int unsigned NOSC   = 1000;
  localparam int unsigned NCFG   = 1 << (2 * STAGES);

  logic [NPL-1:0]      ctrl;
  logic [NPL-1:0]      roout;
  logic [2*STAGES-1:0] rosel;
  int checks = 0, failures = 0;
  real per [NPL][NCFG];

  for (genvar p = 0; p < NPL; p++) begin : g_pl
    tc_ro #(.STAGES(STAGES), .SEED(p + 1)) dut (
      .ctrl (ctrl[p]),
      .rosel(rosel),
      .roout(roout[p])
    );
  end

  // Half period of the ring: for stage j the element used is the copy picked
  // by the next stage's even bit, plus the F7MUX when bit 2j+1 is set.
  function automatic real expected_half(int unsigned seed, logic [2*STAGES-1:0] s);
    real t = 0.0;
    for (int j = 0; j < STAGES; j++) begin
      int nxt = (j + 1) % STAGES;
      t += elem_delay(seed, 0, j, s[2*nxt] ? EL_LOWER : EL_UPPER, 0.5, 0.3, 0.25);
      if (s[2*j+1]) t += elem_delay(seed, 0, j, EL_F7, 0.5, 0.3, 0.25);
    end
    return t;
  endfunction

  task automatic measure(int p, int c);
    realtime t0;
    @(posedge roout[p]);
    t0 = $realtime;
    repeat (NOSC) @(posedge roout[p]);
    per[p][c] = ($realtime - t0) / NOSC;
  endtask

  // Sorts a copy of one placement's periods and prints frequency quartiles.
  task automatic summarise(int p);
    real f[NCFG];
    real dmin, dmax;
    int  distinct;
    longint q [NCFG];
    for (int c = 0; c < NCFG; c++) begin
      f[c] = 1000.0 / per[p][c];
      q[c] = longint'(per[p][c] * 1000.0);
    end
    f.sort();
    q.sort();
    distinct = 1;
    for (int c = 1; c < NCFG; c++)
      if (q[c] != q[c-1]) distinct++;
    dmin = f[0];
    dmax = f[NCFG-1];
    $display("placement %0d: MHz min %.1f  q1 %.1f  median %.1f  q3 %.1f  max %.1f  (%0d distinct periods)",
             p + 1, dmin, f[NCFG/4], f[NCFG/2], f[3*NCFG/4], dmax, distinct);
    checks++;
    if (dmax < 1.5 * dmin) begin
      failures++;
      $display("FAIL placement %0d: frequency range %.1f..%.1f MHz too narrow", p + 1, dmin, dmax);
    end
    checks++;
    if (distinct < NCFG / 2) begin
      failures++;
      $display("FAIL placement %0d: only %0d distinct periods", p + 1, distinct);
    end
  endtask

  initial begin
    ctrl  = '0;
    rosel = '0;
    for (int c = 0; c < NCFG; c++) begin
      ctrl  = '0;
      rosel = (2 * STAGES)'(c);
      #30;
      ctrl = '1;
      fork
        measure(0, c);
        measure(1, c);
        measure(2, c);
        measure(3, c);
      join
      for (int p = 0; p < NPL; p++) begin
        automatic real e = 2.0 * expected_half(p + 1, rosel);
        checks++;
        if (per[p][c] < e - 0.01 || per[p][c] > e + 0.01) begin
          failures++;
          $display("FAIL placement %0d rosel=%02h: period %.4f ns, expected %.4f ns",
                   p + 1, c, per[p][c], e);
        end
      end
    end
    for (int p = 0; p < NPL; p++) summarise(p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
