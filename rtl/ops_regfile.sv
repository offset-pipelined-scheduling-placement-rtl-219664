// ops_regfile: 8-entry standard register file of a domain.
//
// A routed word arriving at the write port is stored at the instruction's
// write address when its valid bit is set and the domain is executing: the
// word's valid bit is the write enable, as the mapping tools rely on when
// they park a value whose consumer time is not known. The read port returns
// the entry at the instruction's read address combinationally, together with
// a per-entry valid bit that reset clears. Depth and the valid-as-write-enable
// rule follow the architecture description; one read and one write port are
// this design's choice.
module ops_regfile
  import ops_pkg::*;
#(
  parameter int unsigned DEPTH = RF_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  word_t                    wdata,
  output word_t                    rdata
);
  word_t regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (en && wdata.valid) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];
endmodule
