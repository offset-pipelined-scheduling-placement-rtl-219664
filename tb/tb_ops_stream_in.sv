// tb_ops_stream_in: a producer with random gaps feeds numbered words, the
// schedule pops at random; every popped word must be the next in order, none
// may be lost or duplicated, and popping an empty buffer must flag underflow.
module tb_ops_stream_in;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, in_ready, pop, underflow;
  logic [31:0] in_data;
  word_t word;
  int checks = 0, failures = 0, next_send = 0, next_recv = 0, underflows = 0;
  ops_stream_in dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    in_valid = 0; in_data = 0; pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (!in_valid || in_ready) ; // previous word accepted at last edge handled below
      in_valid = ($urandom_range(2) != 0);
      in_data  = 32'(next_send) ^ 32'hA5A5_0000;
      pop      = ($urandom_range(2) != 0);
      #1;
      if (pop) begin
        checks++;
        if (word.valid) begin
          if (word.data != (32'(next_recv) ^ 32'hA5A5_0000)) begin failures++; $display("FAIL order %0d", next_recv); end
          next_recv++;
          if (underflow) begin failures++; $display("FAIL spurious underflow"); end
        end else begin
          underflows++;
          if (!underflow) begin failures++; $display("FAIL underflow not flagged"); end
        end
      end
      @(posedge clk);
      if (in_valid && in_ready) next_send++;
    end
    checks++;
    if (underflows == 0 || next_recv < 1000) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
