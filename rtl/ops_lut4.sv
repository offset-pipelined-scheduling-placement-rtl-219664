// ops_lut4: 4-input lookup table on the 1-bit interconnect.
//
// The output is the truth-table bit addressed by the four inputs
// (in[3] is the most significant address bit). The truth table is part of
// each per-cycle instruction, so a LUT can compute a different function in
// every issue slot. Combinational; the bit crossbar registers the result.
// The 4-input size follows the architecture description; per-instruction
// truth tables are this design's choice.
module ops_lut4 (
  input  logic [15:0] tt,
  input  logic [3:0]  in,
  output logic        out
);
  always_comb out = tt[in];
endmodule
