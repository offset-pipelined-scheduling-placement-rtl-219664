// tb_ops_mem: fills the 4 KB memory through the write port, then reads every
// word back, checking the one-cycle read latency and the valid bit, and that
// writes are blocked when the domain is idle or a word is invalid.
module tb_ops_mem;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, en, we;
  word_t addr, wdata, rdata;
  logic [31:0] shadow [1024];
  int checks = 0, failures = 0;
  ops_mem dut (.*);
  always #5 clk = ~clk;
  function automatic logic [31:0] pat(int i); return 32'(i) * 32'h9E37_79B9 + 32'h1234; endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = '{valid: 1, data: 32'(i)}; wdata = '{valid: 1, data: pat(i)};
      shadow[i] = pat(i);
    end
    // blocked writes
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; addr = '{valid: 1, data: 32'(i)}; wdata = '{valid: 1, data: 32'hdead_beef};
      case (i % 3) 0: en = 0; 1: begin en = 1; wdata.valid = 0; end default: begin en = 1; addr.valid = 0; end endcase
    end
    @(negedge clk); we = 0; en = 1;
    for (int i = 0; i < 1024; i++) begin
      int j;
      j = (i * 37) % 1024;
      @(negedge clk);
      addr = '{valid: 1, data: 32'(j)};
      @(negedge clk);
      addr = '0;
      checks++;
      if (!rdata.valid || rdata.data != shadow[j]) begin failures++; $display("FAIL read %0d: %h", j, rdata.data); end
      #1 checks++;
      @(negedge clk);
      if (rdata.valid) begin failures++; $display("FAIL valid without address"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
