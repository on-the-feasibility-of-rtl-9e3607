// tc_tero_ring: TERO ring with TC-RO branches (TC-TERO), behavioural model.
//
// BEHAVIOURAL MODEL: a transition effect ring oscillator is an RS latch
// driven out of its metastable state; its output is analog timing, not
// logic. This model reproduces the waveform at TO and the statistics of the
// number of oscillations, and is not synthesizable. On an FPGA the ring is
// built from LUT and F7MUX primitives exactly as in tc_ro (two TC-RO chains
// closed through each other instead of onto themselves).
//
// Ring: branch 1 (N = 3 buffers, 4 stages, ROSEL[7:0]) ends in NAND1, whose
// output is TO; branch 2 (M = 5 buffers, 6 stages, ROSEL[19:8]) ends in
// NAND2. Each NAND output pair drives the first stage of the other branch,
// so the 20-bit parameter picks a path of tau1 through branch 1 and tau2
// through branch 2 (tero_pkg::chain_delay). The split of the 20 bits into
// [7:0] and [19:8], and the cross-coupling of the chains, are choices of
// this implementation.
//
// Oscillation (stochastic model of the TERO): with CTRL = 0 both NAND gates
// output 1. When CTRL rises, TO falls, then shows a '0' pulse of width
// T/2*(1-d) and a '1' pulse of width T/2*(1+d), T = tau1 + tau2, with
// d starting at the relative delay difference (tau2 - tau1)/T. After every
// oscillation d grows by the amplification factor R and receives Gaussian
// relative jitter of deviation SIGMA_R: d <- R*d + SIGMA_R*g. When |d|
// reaches 1 the pulse has vanished and TO rests at 1 (d >= 1) or 0
// (d <= -1). When CTRL falls TO returns to 1. R and SIGMA_R default to the
// values fitted to a measured TC-TERO; the element delays are modelling
// choices (see tero_pkg).
`timescale 1ns / 1ps
module tc_tero_ring #(
  parameter int unsigned SEED     = 1,
  parameter real         LUT_NS   = 0.50,
  parameter real         F7_NS    = 0.30,
  parameter real         VAR_FRAC = 0.25,
  parameter real         R        = 1.01908,
  parameter real         SIGMA_R  = 0.00192
) (
  input  logic                        ctrl,
  input  logic [tero_pkg::SEL_W-1:0]  rosel,
  output logic                        to
);
  import tero_pkg::*;

  real tau1, tau2, per, d;
  bit  run;

  // Standard normal sample, sum of twelve uniforms minus six.
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  initial begin
    to = 1'b1;
    forever begin
      wait (ctrl);
      tau1 = chain_delay(SEED, 0, S1, 32'(rosel[2*S1-1:0]), rosel[2*S1],
                         LUT_NS, F7_NS, VAR_FRAC);
      tau2 = chain_delay(SEED, 1, S2, 32'(rosel[SEL_W-1:2*S1]), rosel[0],
                         LUT_NS, F7_NS, VAR_FRAC);
      per  = tau1 + tau2;
      d    = (tau2 - tau1) / per;
      run  = 1'b1;
      #(LUT_NS);                       // NAND1 responds to CTRL
      while (run && ctrl) begin
        if (d >= 1.0) begin            // '0' pulse vanished: latch holds 1
          to  = 1'b1;
          run = 1'b0;
        end else begin
          to = 1'b0;
          if (d <= -1.0) begin         // '1' pulse vanished: latch holds 0
            run = 1'b0;
          end else begin
            #(per / 2.0 * (1.0 - d));
            to = 1'b1;                 // one oscillation (rising edge)
            #(per / 2.0 * (1.0 + d));
            d = R * d + SIGMA_R * gauss();
          end
        end
      end
      wait (!ctrl);
      #(LUT_NS);
      to = 1'b1;
    end
  end

endmodule
