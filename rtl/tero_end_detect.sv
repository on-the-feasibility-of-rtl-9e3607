// tero_end_detect: end-of-oscillation detector producing OE.
//
// Two flip-flops, as in the published controller. The first (the
// "precharged" flop) is clocked by TO, is preset to 1 by PRE and samples the
// counter MSB Q[8]: while the ring oscillates and the counter is not
// saturated, the first TO rising edge after a precharge pulls it to 0; it
// stays 1 if no edge arrived (oscillation over) or if the counter saturated.
// The second flop runs on the system clock and copies the first when EN is
// high, at the end of each precharge period, giving OE. The control circuit
// can force OE to 1 with TMO (the timeout). The synchronous OE_CLR that
// drops OE between samples is a choice of this implementation.
//
// Timing: PRE is one system-clock cycle wide at the start of a period and EN
// is high in its last cycle, so OE reports whether TO rose during the rest
// of the period; OE is valid one cycle after EN (or TMO).
`timescale 1ns / 1ps
module tero_end_detect (
  input  logic clk,      // system clock
  input  logic rst_n,    // asynchronous reset, active low
  input  logic to_clk,   // TO through the clock buffer
  input  logic q_msb,    // counter Q[8]
  input  logic pre,      // asynchronous precharge, active high
  input  logic en,       // capture enable for OE
  input  logic tmo,      // timeout: force OE to 1
  input  logic oe_clr,   // drop OE
  output logic oe
);

  logic q_pre;

  always_ff @(posedge to_clk or posedge pre) begin
    if (pre)
      q_pre <= 1'b1;
    else
      q_pre <= q_msb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      oe <= 1'b0;
    else if (tmo)
      oe <= 1'b1;
    else if (oe_clr)
      oe <= 1'b0;
    else if (en)
      oe <= q_pre;
  end

endmodule
