// tero_ctrl: control circuit of the TERO TRNG controller (system clock).
//
// One random sample is taken per pass through IDLE -> RUN -> DONE:
//   IDLE  CTRL = 0 (ring at rest), counter cleared (CLR), end detector
//         precharged (PRE) and OE dropped, for IDLE_CYCLES cycles.
//   RUN   CTRL = 1 starts the ring. Time is cut into precharge periods of
//         PRE_NS: PRE is high in the first cycle of a period and EN in the
//         last, so OE tells after each period whether the ring has stopped
//         (or the counter saturated). A fail-safe timer forces OE (TMO) after
//         TIMEOUT_NS, for an oscillation the counter fails to end.
//   DONE  One cycle with VALID high: the CNT register holds the sample.
//         TIMED_OUT tells whether it ended by the timeout.
// The 40 ns precharge period and the 2 us timeout follow the published
// controller. The clock period (10 ns, the usual 100 MHz board clock), the
// idle time, the state sequence and the handshake (ENABLE in, VALID out)
// are choices of this implementation.
//
// All outputs are registered, so the asynchronous PRE and CLR inputs of the
// TO-domain flops see no decoding glitches. During reset CLR and PRE are low;
// they rise in the first IDLE cycle, so every start from reset sees a clean
// clear edge (the ring is held still by CTRL = 0 meanwhile).
`timescale 1ns / 1ps
module tero_ctrl #(
  parameter int unsigned CLK_NS      = 10,
  parameter int unsigned PRE_NS      = 40,
  parameter int unsigned TIMEOUT_NS  = 2000,
  parameter int unsigned IDLE_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,     // keep sampling while high
  input  logic oe,         // from the end detector
  output logic ctrl,       // TERO start
  output logic clr,        // counter clear
  output logic pre,        // precharge
  output logic en,         // OE capture enable
  output logic tmo,        // force OE
  output logic oe_clr,     // drop OE
  output logic valid,      // CNT holds a sample this cycle
  output logic timed_out   // that sample ended by the timeout
);

  localparam int unsigned PRE_CYC = PRE_NS / CLK_NS;
  localparam int unsigned TMO_CYC = TIMEOUT_NS / CLK_NS;
  localparam int unsigned PW = $clog2(PRE_CYC + 1);
  localparam int unsigned TW = $clog2(TMO_CYC + 1);
  localparam int unsigned IW = $clog2(IDLE_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e        state, state_n;
  logic [PW-1:0] phase, phase_n;
  logic [TW-1:0] timer, timer_n;
  logic [IW-1:0] wait_c, wait_n;
  logic          tmo_seen, tmo_seen_n;

  always_comb begin
    state_n    = state;
    phase_n    = phase;
    timer_n    = timer;
    wait_n     = wait_c;
    tmo_seen_n = tmo_seen;
    unique case (state)
      S_IDLE: begin
        if (wait_c != IW'(IDLE_CYCLES - 1)) begin
          wait_n = wait_c + 1'b1;
        end else if (enable) begin
          state_n    = S_RUN;
          phase_n    = '0;
          timer_n    = '0;
          tmo_seen_n = 1'b0;
        end
      end
      S_RUN: begin
        if (oe) begin
          state_n = S_DONE;
        end else begin
          phase_n = (phase == PW'(PRE_CYC - 1)) ? '0 : phase + 1'b1;
          if (timer != TW'(TMO_CYC - 1))
            timer_n = timer + 1'b1;
          else
            tmo_seen_n = 1'b1;
        end
      end
      S_DONE: begin
        state_n = S_IDLE;
        wait_n  = '0;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= '0;
      timer     <= '0;
      wait_c    <= '0;
      tmo_seen  <= 1'b0;
      ctrl      <= 1'b0;
      clr       <= 1'b0;
      pre       <= 1'b0;
      en        <= 1'b0;
      tmo       <= 1'b0;
      oe_clr    <= 1'b1;
      valid     <= 1'b0;
      timed_out <= 1'b0;
    end else begin
      state     <= state_n;
      phase     <= phase_n;
      timer     <= timer_n;
      wait_c    <= wait_n;
      tmo_seen  <= tmo_seen_n;
      ctrl      <= (state_n == S_RUN);
      clr       <= (state_n != S_RUN) && (state_n != S_DONE);
      pre       <= (state_n != S_RUN) || (phase_n == '0);
      en        <= (state_n == S_RUN) && (phase_n == PW'(PRE_CYC - 1));
      tmo       <= (state_n == S_RUN) && (timer_n == TW'(TMO_CYC - 1)) && !tmo_seen_n;
      oe_clr    <= (state_n != S_RUN);
      valid     <= (state_n == S_DONE);
      timed_out <= (state_n == S_DONE) ? tmo_seen_n : timed_out;
    end
  end

  // EN and PRE never coincide, and the precharge period is at least two
  // cycles long so that TO has time to clear the precharged flop.
  initial assert (PRE_CYC >= 2) else $error("precharge period shorter than two clocks");
  assert property (@(posedge clk) disable iff (!rst_n) !(en && pre));

endmodule
