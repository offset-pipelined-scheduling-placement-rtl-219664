// ops_config_mem: instruction store of a domain.
//
// Holds 256 per-cycle configurations ("instructions"), one for every value of
// the 8-bit program counter. It is written through a simple load port before
// the array runs and read combinationally at the domain's registered program
// counter, so an instruction applies during the cycle in which the counter
// holds its address. While the counter is not valid the output is the
// all-zero instruction, a no-operation. The 256-entry size follows the
// architecture description; the load port and read timing are this design's
// choice.
module ops_config_mem
  import ops_pkg::*;
(
  input  logic             clk,
  input  logic             we,
  input  logic [PC_W-1:0]  waddr,
  input  instr_t           wdata,
  input  pcbus_t           pc,
  output instr_t           instr
);
  instr_t mem [NINSTR];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instr = pc.valid ? mem[pc.pc] : '0;
endmodule
