// tero_counter: counter of TERO oscillations, clocked by the ring output.
//
// The TERO output TO, after a clock buffer, is the clock of this counter, so
// every rising edge of TO (one oscillation) adds one. The counter is W = 9
// bits wide: once the count reaches 2^(W-1) = 256 its MSB Q[8] is 1, which
// marks saturation for the rest of the controller. The 9-bit width and the
// role of Q[8] follow the published controller. Holding the count once Q[8]
// is set (so Q[8] cannot fall again during a very long oscillation) and the
// asynchronous clear CLR, driven by the control circuit between samples,
// are choices of this implementation.
//
// Timing: q changes shortly after each rising TO edge; it is read in the
// system clock domain only after the oscillation has ended.
`timescale 1ns / 1ps
module tero_counter #(
  parameter int unsigned W = tero_pkg::CNT_W
) (
  input  logic         to_clk,  // TO through the clock buffer
  input  logic         clr,     // asynchronous clear, active high
  output logic [W-1:0] q
);

  always_ff @(posedge to_clk or posedge clr) begin
    if (clr)
      q <= '0;
    else if (!q[W-1])
      q <= q + 1'b1;
  end

endmodule
