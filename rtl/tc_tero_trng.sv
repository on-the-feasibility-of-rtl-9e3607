// tc_tero_trng: true random number generator built on a configurable TERO.
//
// A transition effect ring oscillator (TERO) oscillates for a random number
// of periods each time it is started; the parity of that number is the
// random bit. Because the useful behaviour depends strongly on where the ring
// is placed, the ring's two branches are three-path configurable chains
// (TC-RO) so that a 20-bit parameter ROSEL can pick a good path at run time
// instead of re-placing the design.
//
// Datapath, as in the published controller:
//   tc_tero_ring   the ring (behavioural model); output TO.
//   TO is used directly as a clock (on the FPGA through a regional clock
//   buffer) for
//   tero_counter   9-bit oscillation counter, Q[8] = saturated, and the
//   tero_end_detect precharged flop that notices the end of oscillation;
//                  its system-clock half produces OE.
//   tero_cnt_reg   CNT = Q[7:0], forced to 0xff by Q[8].
//   tero_ctrl      starts the ring, runs the 40 ns precharge periods, the
//                  2 us timeout, and marks each finished sample.
// and post-processing:
//   lsb_extract    LSB of every non-saturated sample = raw bit.
//   lfsr_xor       raw bit XOR 4-bit LFSR = whitened bit.
//
// Beside the generator, and independent of it, the top carries one
// standalone TC-RO (8-bit parameter), the configurable ring oscillator that
// the TERO branches are built from; it is meant as a frequency-configurable
// clock source, for example for coherent-sampling generators, and has its
// own ports TCRO_CTRL, TCRO_SEL and TCRO_OUT.
//
// Interface: CLK is the system clock (10 ns by default), RST_N an
// asynchronous active-low reset, ENABLE keeps sampling. CNT/OE are the
// controller outputs; CNT_VALID pulses for one cycle per sample. RAW_* and
// RND_* are the bit streams, one bit per non-saturated sample.
`timescale 1ns / 1ps
module tc_tero_trng #(
  parameter int unsigned SEED       = 1,
  parameter real         LUT_NS     = 0.50,
  parameter real         F7_NS      = 0.30,
  parameter real         VAR_FRAC   = 0.25,
  parameter real         R          = 1.01908,
  parameter real         SIGMA_R    = 0.00192,
  parameter int unsigned CLK_NS     = 10,
  parameter int unsigned PRE_NS     = 40,
  parameter int unsigned TIMEOUT_NS = 2000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic [tero_pkg::SEL_W-1:0]  rosel,
  output logic [tero_pkg::OUT_W-1:0]  cnt,
  output logic                        oe,
  output logic                        cnt_valid,
  output logic                        timed_out,
  output logic                        raw_bit,
  output logic                        raw_valid,
  output logic                        rnd_bit,
  output logic                        rnd_valid,
  input  logic                        tcro_ctrl,
  input  logic [2*tero_pkg::S1-1:0]   tcro_sel,
  output logic                        tcro_out
);
  import tero_pkg::*;

  logic             ring_ctrl, to;
  logic [CNT_W-1:0] q;
  logic             clr, pre, en, tmo, oe_clr;

  tc_tero_ring #(
    .SEED(SEED), .LUT_NS(LUT_NS), .F7_NS(F7_NS), .VAR_FRAC(VAR_FRAC),
    .R(R), .SIGMA_R(SIGMA_R)
  ) u_ring (
    .ctrl (ring_ctrl),
    .rosel(rosel),
    .to   (to)
  );

  tero_counter #(.W(CNT_W)) u_counter (
    .to_clk(to),
    .clr   (clr),
    .q     (q)
  );

  tero_end_detect u_end (
    .clk   (clk),
    .rst_n (rst_n),
    .to_clk(to),
    .q_msb (q[CNT_W-1]),
    .pre   (pre),
    .en    (en),
    .tmo   (tmo),
    .oe_clr(oe_clr),
    .oe    (oe)
  );

  tero_cnt_reg #(.W(OUT_W)) u_cnt (
    .clk(clk),
    .set(q[CNT_W-1]),
    .d  (q[OUT_W-1:0]),
    .cnt(cnt)
  );

  tero_ctrl #(
    .CLK_NS(CLK_NS), .PRE_NS(PRE_NS), .TIMEOUT_NS(TIMEOUT_NS)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (enable),
    .oe       (oe),
    .ctrl     (ring_ctrl),
    .clr      (clr),
    .pre      (pre),
    .en       (en),
    .tmo      (tmo),
    .oe_clr   (oe_clr),
    .valid    (cnt_valid),
    .timed_out(timed_out)
  );

  lsb_extract #(.W(OUT_W)) u_lsb (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid    (cnt_valid),
    .cnt      (cnt),
    .timed_out(timed_out),
    .bit_out  (raw_bit),
    .bit_valid(raw_valid)
  );

  lfsr_xor u_post (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_bit   (raw_bit),
    .in_valid (raw_valid),
    .out_bit  (rnd_bit),
    .out_valid(rnd_valid)
  );

  tc_ro #(
    .STAGES(S1), .SEED(SEED), .LUT_NS(LUT_NS), .F7_NS(F7_NS), .VAR_FRAC(VAR_FRAC)
  ) u_tcro (
    .ctrl (tcro_ctrl),
    .rosel(tcro_sel),
    .roout(tcro_out)
  );

endmodule
