// ops_xbar: registered crossbar.
//
// Each of NSNK sinks selects one of NSRC sources with its select field of the
// current instruction; the selected value is registered, so a value moves
// through one crossbar per cycle. Select values at or above NSRC give zero.
// Used for the word crossbar, the bit crossbar and the switch box of a
// domain. Registering at the multiplexer outputs follows the architecture
// description; full connectivity is this design's choice.
module ops_xbar #(
  parameter int unsigned NSRC  = 27,
  parameter int unsigned NSNK  = 10,
  parameter int unsigned WIDTH = 33,
  parameter int unsigned SELW  = $clog2(NSRC)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NSNK-1:0][SELW-1:0]  sel,
  input  logic [NSRC-1:0][WIDTH-1:0] src,
  output logic [NSNK-1:0][WIDTH-1:0] snk
);
  for (genvar k = 0; k < NSNK; k++) begin : g_snk
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)              snk[k] <= '0;
      else if (int'(sel[k]) < int'(NSRC)) snk[k] <= src[sel[k]];
      else                     snk[k] <= '0;
    end
  end
endmodule
