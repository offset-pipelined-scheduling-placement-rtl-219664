// ops_mem: 4 KB data memory of a domain (1024 words of 32 bits).
//
// The address and write data come from the word crossbar registers, the write
// enable from the bit crossbar. A write happens at the clock edge when the
// domain is executing, the enable bit is set and both address and data words
// are valid. Reads are synchronous: the word at a valid address appears on
// rdata (valid) one cycle later, so a load issued in cycle t reaches the
// crossbar at the end of cycle t+1. The 4 KB size follows the architecture
// description; the word organisation and read timing are this design's choice.
module ops_mem
  import ops_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t addr,
  input  word_t wdata,
  input  logic  we,
  output word_t rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [W-1:0] mem [WORDS];
  logic [AW-1:0] a;
  logic          rd_valid;
  logic [W-1:0]  rd_data;

  assign a = addr.data[AW-1:0];

  always_ff @(posedge clk) begin
    if (en && we && addr.valid && wdata.valid) mem[a] <= wdata.data;
    rd_data <= mem[a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= en & addr.valid & ~we;
  end

  assign rdata = '{valid: rd_valid, data: rd_data};
endmodule
