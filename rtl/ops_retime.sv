// ops_retime: retiming chain at a domain input.
//
// Delays its input by 0, 1, 2 or 3 clock cycles as configured (0 is a
// combinational pass). Three registers always shift; dly picks the tap. The
// 0..3 range follows the architecture description; a static (not
// per-instruction) delay setting is this design's choice.
module ops_retime #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned MAXD  = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(MAXD+1)-1:0] dly,
  input  logic [WIDTH-1:0]          d,
  output logic [WIDTH-1:0]          q
);
  logic [WIDTH-1:0] stage [MAXD+1];

  assign stage[0] = d;
  for (genvar i = 1; i <= MAXD; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stage[i] <= '0;
      else        stage[i] <= stage[i-1];
    end
  end

  assign q = (int'(dly) > int'(MAXD)) ? stage[MAXD] : stage[dly];
endmodule
