// tero_pkg: constants and helper functions shared by the TC-TERO TRNG.
//
// The TC-TERO ring is built from three-path configurable ring oscillator
// (TC-RO) chains. A chain of S stages is configured by 2*S bits: for stage j,
// bit 2j selects the upper or lower copy of the previous stage, and bit 2j+1
// selects whether that signal is taken directly (LUT to LUT) or through the
// F7MUX that sits between the two copies. The branch lengths N = 3 and M = 5
// buffers, the resulting 20-bit parameter, the 9-bit counter, the 40 ns
// precharge cycle and the 2 us timeout follow the published design. The
// element delay figures and the placement-variation hash are modelling
// choices of this implementation: they only feed the behavioural ring models.
`timescale 1ns / 1ps
package tero_pkg;

  // Branch lengths of the TERO ring, in buffers.
  localparam int unsigned N_BUF = 3;
  localparam int unsigned M_BUF = 5;
  // A chain with B buffers has B+1 configurable stages (the last one shares
  // its LUT with the NAND gate) and therefore 2*B+2 parameter bits.
  localparam int unsigned S1 = N_BUF + 1;
  localparam int unsigned S2 = M_BUF + 1;
  localparam int unsigned SEL_W = 2 * S1 + 2 * S2;  // 20

  // Controller sizes.
  localparam int unsigned CNT_W = 9;   // internal counter, Q[8] is saturation
  localparam int unsigned OUT_W = 8;   // CNT output

  // Kind of delay element in a TC-RO chain.
  typedef enum logic [1:0] {
    EL_UPPER = 2'd0,   // LUT of the upper copy (3:1 multiplexer, or mux+NAND)
    EL_LOWER = 2'd1,   // LUT of the lower copy
    EL_F7    = 2'd2    // F7MUX between the copies
  } elem_e;

  // Deterministic pseudo-random number in [0,1) from a placement seed and an
  // element index (integer hash, xorshift-multiply). It stands for the
  // manufacturing and routing variation of one placed element.
  function automatic real elem_variation(int unsigned seed, int unsigned idx);
    logic [31:0] h;
    h = seed * 32'h9E37_79B1 ^ (idx + 32'h7F4A_7C15) * 32'h85EB_CA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return real'(h[23:0]) / 16777216.0;
  endfunction

  // Delay in ns of one element: nominal delay times (1 +/- var_frac).
  function automatic real elem_delay(int unsigned seed, int unsigned branch,
                                     int unsigned stage, elem_e kind,
                                     real lut_ns, real f7_ns, real var_frac);
    int unsigned idx;
    real nominal;
    idx = branch * 64 + stage * 4 + int'(kind);
    nominal = (kind == EL_F7) ? f7_ns : lut_ns;
    return nominal * (1.0 + var_frac * (2.0 * elem_variation(seed, idx) - 1.0));
  endfunction

  // Delay in ns through one TC-RO chain of `stages` stages.
  //   sel      : the chain's 2*stages configuration bits
  //   next_b0  : bit 0 of the chain that this chain drives; it decides
  //              whether the upper or lower copy of this chain's last stage
  //              is the one in use.
  // Stage j's element in use is the copy picked by bit 0 of stage j+1; if
  // bit 2j+1 is set the F7MUX in front of stage j is in the path as well.
  function automatic real chain_delay(int unsigned seed, int unsigned branch,
                                      int unsigned stages, logic [31:0] sel,
                                      logic next_b0, real lut_ns, real f7_ns,
                                      real var_frac);
    real t;
    logic side;
    t = 0.0;
    for (int unsigned j = 0; j < stages; j++) begin
      side = (j + 1 < stages) ? sel[2 * (j + 1)] : next_b0;
      t += elem_delay(seed, branch, j, side ? EL_LOWER : EL_UPPER,
                      lut_ns, f7_ns, var_frac);
      if (sel[2 * j + 1])
        t += elem_delay(seed, branch, j, EL_F7, lut_ns, f7_ns, var_frac);
    end
    return t;
  endfunction

endpackage
