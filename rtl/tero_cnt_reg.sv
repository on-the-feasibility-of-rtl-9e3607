// tero_cnt_reg: CNT output register of the TERO controller.
//
// An 8-bit register on the system clock that samples the low eight counter
// bits Q[7:0] every cycle. Its asynchronous SET input is the counter MSB
// Q[8], so a saturated count reads as 0xff (255). Both follow the published
// controller. The value is meaningful once OE has reported the end of the
// oscillation, when the counter no longer moves.
`timescale 1ns / 1ps
module tero_cnt_reg #(
  parameter int unsigned W = tero_pkg::OUT_W
) (
  input  logic         clk,
  input  logic         set,   // counter Q[8], asynchronous, active high
  input  logic [W-1:0] d,     // counter Q[7:0]
  output logic [W-1:0] cnt
);

  always_ff @(posedge clk or posedge set) begin
    if (set)
      cnt <= '1;
    else
      cnt <= d;
  end

endmodule
