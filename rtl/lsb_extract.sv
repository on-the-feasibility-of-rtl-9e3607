// lsb_extract: raw random bit from each counter sample.
//
// The entropy of the TERO lies in the parity of the number of oscillations,
// so the raw output bit is the least significant bit of the count. Samples
// that read 0xff (the counter saturated) carry no usable parity and are
// dropped, as in the published evaluation. Dropping samples that ended by
// the timeout as well is a choice of this implementation: such a count comes
// from a ring the counter could not follow.
//
// Timing: BIT_OUT and BIT_VALID are registered, one cycle after VALID.
`timescale 1ns / 1ps
module lsb_extract #(
  parameter int unsigned W = tero_pkg::OUT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic [W-1:0] cnt,
  input  logic         timed_out,
  output logic         bit_out,
  output logic         bit_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= valid && (cnt != '1) && !timed_out;
      if (valid)
        bit_out <= cnt[0];
    end
  end

endmodule
