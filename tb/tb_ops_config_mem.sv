// tb_ops_config_mem: writes all 256 instructions with distinct contents, then
// reads them back through the program counter port in random order; an
// invalid program counter must give the all-zero (no-operation) instruction.
module tb_ops_config_mem;
  import ops_pkg::*;
  logic clk = 0, we;
  logic [7:0] waddr;
  instr_t wdata, instr;
  pcbus_t pc;
  int checks = 0, failures = 0;
  ops_config_mem dut (.*);
  always #5 clk = ~clk;
  function automatic instr_t mk(int i);
    instr_t x;
    x = '0;
    x.imm = 32'(i) * 32'h0101_0101 + 32'h77;
    x.rf_raddr = 3'(i); x.rf_waddr = 3'(i >> 3);
    x.lut_tt[0] = 16'(i * 331);
    x.wsel[0] = WSEL_W'(i % NWSRC);
    x.sbw[NOUT-1] = SBSEL_W'(i % NSBSRC);
    return x;
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = '0; pc = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = mk(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 512; i++) begin
      int a;
      a = (i * 97) % 256;
      @(negedge clk);
      pc = '{valid: (i % 8 != 0), pc: 8'(a)};
      #1;
      checks++;
      if (pc.valid ? (instr !== mk(a)) : (instr !== '0)) begin failures++; $display("FAIL pc=%0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
