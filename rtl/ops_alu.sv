// ops_alu: 32-bit ALU of a domain.
//
// Executes the operation of the current instruction on two routed words and a
// control bit. All operations are single cycle (the result is combinational
// from operands that the word crossbar has already registered) except
// multiplication, which passes through one internal register and so appears
// one cycle later: a multiply issued in cycle t is captured by the crossbar at
// the end of cycle t+1. The single-cycle/two-cycle latencies follow the
// architecture description; the operation set, the flag (result nonzero) and
// the valid rule (AND of the used operands' valid bits) are this design's
// choices. When a multiply result emerges it takes the output in place of any
// single-cycle result of that cycle; the schedule is expected to avoid that
// collision.
module ops_alu
  import ops_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  logic    ctrl,
  output word_t   y,
  output logic    flag
);
  word_t  comb_y;
  word_t  mul_q;

  always_comb begin
    comb_y.valid = a.valid & b.valid;
    comb_y.data  = '0;
    unique case (op)
      ALU_NOP:  comb_y.valid = 1'b0;
      ALU_PASS: begin comb_y.valid = a.valid; comb_y.data = a.data; end
      ALU_ADD:  comb_y.data = a.data + b.data;
      ALU_SUB:  comb_y.data = a.data - b.data;
      ALU_MUL:  comb_y.valid = 1'b0;  // result leaves through mul_q
      ALU_AND:  comb_y.data = a.data & b.data;
      ALU_OR:   comb_y.data = a.data | b.data;
      ALU_XOR:  comb_y.data = a.data ^ b.data;
      ALU_SHL:  comb_y.data = a.data << b.data[4:0];
      ALU_SHR:  comb_y.data = a.data >> b.data[4:0];
      ALU_SRA:  comb_y.data = W'($signed(a.data) >>> b.data[4:0]);
      ALU_EQ:   comb_y.data = W'(a.data == b.data);
      ALU_LT:   comb_y.data = W'($signed(a.data) < $signed(b.data));
      ALU_LTU:  comb_y.data = W'(a.data < b.data);
      ALU_SEL:  comb_y.data = ctrl ? a.data : b.data;
      ALU_MAX:  comb_y.data = ($signed(a.data) > $signed(b.data)) ? a.data : b.data;
      default:  comb_y.valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mul_q <= '0;
    else if (op == ALU_MUL) begin
      mul_q.valid <= a.valid & b.valid;
      mul_q.data  <= a.data * b.data;
    end else begin
      mul_q.valid <= 1'b0;
    end
  end

  assign y    = mul_q.valid ? mul_q : comb_y;
  assign flag = y.valid & (|y.data);
endmodule
