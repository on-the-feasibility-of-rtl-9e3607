// lfsr_xor: light post-processing that whitens the raw bit stream.
//
// Each raw bit is XOR-ed with the next output bit of a 4-bit linear feedback
// shift register; the LFSR advances once per raw bit. This removes the
// small bias of the raw bits for a few LUTs and flip-flops.
// The 4-bit LFSR and the XOR follow the published post-processing; the
// feedback polynomial x^4 + x^3 + 1 (maximal length, period 15), the
// Fibonacci form and the reset value 4'b0001 are choices of this
// implementation.
//
// LFSR step: s <= {s[2:0], s[3] ^ s[2]}; the key bit used is s[3].
// Timing: OUT_BIT and OUT_VALID are registered, one cycle after IN_VALID.
`timescale 1ns / 1ps
module lfsr_xor #(
  parameter logic [3:0] SEED = 4'b0001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_bit,
  input  logic in_valid,
  output logic out_bit,
  output logic out_valid
);

  logic [3:0] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= SEED;
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bit <= in_bit ^ s[3];
        s       <= {s[2:0], s[3] ^ s[2]};
      end
    end
  end

  initial assert (SEED != 4'b0000) else $error("LFSR seed must be non-zero");

endmodule
