// tc_ro: three-path configurable ring oscillator (TC-RO), behavioural model.
//
// BEHAVIOURAL MODEL: the ring is a loop of look-up tables whose frequency is
// set by which physical elements the signal passes through. Its value lies
// in the element delays, so every element here is a continuous assignment
// with an explicit propagation delay; a synthesis tool ignores the delays
// and sees the bare multiplexer/NAND logic (a combinational loop, which is
// the oscillator itself and why loop warnings on this file stand).
//
// Structure (published design): two copies, upper and lower, of a chain of
// STAGES stages. Each stage has one 3:1 multiplexer per copy; its three data
// inputs are the upper output of the previous stage, the lower output of the
// previous stage, and an F7MUX that chooses between those two. For stage j,
// ROSEL[2j] chooses upper (0) or lower (1) for both the 3:1 multiplexers and
// the F7MUX; ROSEL[2j+1] chooses the F7MUX output (1) or the direct LUT
// input (0). The last stage's multiplexers share their LUTs with the two
// NAND gates, whose second input is CTRL. The ring closes from the NAND
// outputs back to stage 0. ROOut is a further 3:1 multiplexer driven by
// ROSEL[1:0] over the two NAND outputs and the F7MUX between them, i.e. it
// shows the signal that is actually in the ring.
//
// With B buffers in the unconfigurable ring there are STAGES = B+1 stages,
// 2*B+2 configuration bits and 2*B+3 LUTs. The default B = 3 (8-bit
// parameter) is the configuration the design was characterised with.
//
// Timing: while CTRL = 0 both NAND outputs are 1 and the ring is still.
// After CTRL rises the ring oscillates with period 2 * chain delay, where
// the chain delay is tero_pkg::chain_delay() of the selected path. The
// element delays (LUT_NS, F7_NS, VAR_FRAC, SEED) are modelling choices.
`timescale 1ns / 1ps
module tc_ro #(
  parameter int unsigned STAGES   = 4,
  parameter int unsigned SEED     = 1,
  parameter real         LUT_NS   = 0.50,
  parameter real         F7_NS    = 0.30,
  parameter real         VAR_FRAC = 0.25,
  parameter real         OUT_NS   = 0.50
) (
  input  logic                  ctrl,
  input  logic [2*STAGES-1:0]   rosel,
  output logic                  roout
);
  import tero_pkg::*;

  logic [STAGES-1:0] up, lo, f7;   // stage outputs of both copies, F7MUXes
  logic [STAGES-1:0] in_up, in_lo; // stage inputs

  for (genvar j = 0; j < STAGES; j++) begin : g_stage
    localparam real DU = elem_delay(SEED, 0, j, EL_UPPER, LUT_NS, F7_NS, VAR_FRAC);
    localparam real DL = elem_delay(SEED, 0, j, EL_LOWER, LUT_NS, F7_NS, VAR_FRAC);
    localparam real DF = elem_delay(SEED, 0, j, EL_F7,    LUT_NS, F7_NS, VAR_FRAC);
    logic mux;
    if (j == 0) begin : g_first
      assign in_up[j] = up[STAGES-1];
      assign in_lo[j] = lo[STAGES-1];
    end else begin : g_next
      assign in_up[j] = up[j-1];
      assign in_lo[j] = lo[j-1];
    end
    // F7MUX between the two copies, in front of stage j.
    assign #(DF) f7[j] = rosel[2*j] ? in_lo[j] : in_up[j];
    // Logical value chosen by both 3:1 multiplexers of stage j.
    assign mux = rosel[2*j+1] ? f7[j] : (rosel[2*j] ? in_lo[j] : in_up[j]);
    if (j == STAGES - 1) begin : g_nand
      assign #(DU) up[j] = ~(mux & ctrl);
      assign #(DL) lo[j] = ~(mux & ctrl);
    end else begin : g_buf
      assign #(DU) up[j] = mux;
      assign #(DL) lo[j] = mux;
    end
  end

  // Output multiplexer over the NAND outputs and the F7MUX between them.
  assign #(OUT_NS) roout = rosel[1] ? f7[0] : (rosel[0] ? lo[STAGES-1] : up[STAGES-1]);

endmodule
