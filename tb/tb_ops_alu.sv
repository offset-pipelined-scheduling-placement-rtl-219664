// tb_ops_alu: self-checking test of the domain ALU.
// Random operands and operations are compared against a reference model;
// single-cycle results are checked in the issue cycle and multiply results
// exactly one cycle later (two-cycle latency), with no result in the issue
// cycle. The valid rule and flag are checked as well.
module tb_ops_alu;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0;
  alu_op_e op;
  word_t a, b, y;
  logic ctrl, flag;
  int checks = 0, failures = 0;

  ops_alu dut (.*);
  always #5 clk = ~clk;

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t z, logic c);
    word_t r;
    r.valid = x.valid & z.valid;
    case (o)
      ALU_PASS: begin r.valid = x.valid; r.data = x.data; end
      ALU_ADD:  r.data = x.data + z.data;
      ALU_SUB:  r.data = x.data - z.data;
      ALU_AND:  r.data = x.data & z.data;
      ALU_OR:   r.data = x.data | z.data;
      ALU_XOR:  r.data = x.data ^ z.data;
      ALU_SHL:  r.data = x.data << (z.data % 32);
      ALU_SHR:  r.data = x.data >> (z.data % 32);
      ALU_SRA:  r.data = 32'($signed(x.data) >>> (z.data % 32));
      ALU_EQ:   r.data = (x.data == z.data) ? 1 : 0;
      ALU_LT:   r.data = ($signed(x.data) < $signed(z.data)) ? 1 : 0;
      ALU_LTU:  r.data = (x.data < z.data) ? 1 : 0;
      ALU_SEL:  r.data = c ? x.data : z.data;
      ALU_MAX:  r.data = ($signed(x.data) >= $signed(z.data)) ? x.data : z.data;
      default:  begin r.valid = 0; r.data = 0; end
    endcase
    return r;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%0d a=%h b=%h y=%h/%0b", what, op, a.data, b.data, y.data, y.valid); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e;
    logic [31:0] pa, pb;
    op = ALU_NOP; a = '0; b = '0; ctrl = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      op = alu_op_e'($urandom_range(15));
      if (op == ALU_MUL) op = ALU_ADD;
      a = '{valid: ($urandom_range(7) != 0), data: (i % 5 == 0) ? 32'h8000_0000 : $urandom};
      b = '{valid: ($urandom_range(7) != 0), data: (i % 7 == 0) ? a.data : $urandom};
      ctrl = $urandom_range(1);
      #1;
      e = ref_alu(op, a, b, ctrl);
      check("valid", y.valid == e.valid);
      if (e.valid) begin
        check("data", y.data == e.data);
        check("flag", flag == (e.data != 0));
      end else check("flag on invalid", flag == 0);
    end
    // multiply: two-cycle latency
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      op = ALU_MUL;
      pa = $urandom; pb = $urandom;
      a = '{valid: 1, data: pa}; b = '{valid: 1, data: pb};
      #1;
      if (i == 0) check("mul not in issue cycle", !y.valid);
      @(negedge clk);
      op = ALU_NOP; a = '0; b = '0;
      #1;
      check("mul valid after one extra cycle", y.valid);
      check("mul data", y.data == pa * pb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
