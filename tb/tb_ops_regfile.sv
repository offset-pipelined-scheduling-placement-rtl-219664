// tb_ops_regfile: random writes and reads against a shadow model. Checks that
// the word's valid bit and the domain enable gate the write, that reset
// clears the entries, and that a write is visible on the next cycle.
module tb_ops_regfile;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, en;
  logic [2:0] raddr, waddr;
  word_t wdata, rdata;
  word_t shadow [8];
  int checks = 0, failures = 0;
  ops_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    en = 0; raddr = 0; waddr = 0; wdata = '0;
    for (int i = 0; i < 8; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); raddr = 3'(i); #1;
      checks++; if (rdata.valid) begin failures++; $display("FAIL reset entry %0d", i); end
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en    = ($urandom_range(5) != 0);
      waddr = 3'($urandom);
      raddr = 3'($urandom);
      wdata = '{valid: $urandom_range(1), data: $urandom};
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("FAIL read %0d: %h vs %h", raddr, rdata, shadow[raddr]); end
      @(posedge clk);
      if (en && wdata.valid) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
