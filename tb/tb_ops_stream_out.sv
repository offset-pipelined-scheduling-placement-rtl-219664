// tb_ops_stream_out: routed words appear on the port one cycle later only
// while the domain executes and the word is valid; a word emitted while the
// consumer is not ready must set the sticky overflow flag.
module tb_ops_stream_out;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, en, out_valid, out_ready, overflow;
  logic [31:0] out_data;
  word_t word;
  int checks = 0, failures = 0;
  ops_stream_out dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic exp_v; logic [31:0] exp_d;
    en = 0; word = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      word = '{valid: $urandom_range(1), data: $urandom};
      exp_v = en & word.valid; exp_d = word.data;
      @(negedge clk);
      en = 0; word = '0;
      checks++;
      if (out_valid != exp_v || (exp_v && out_data != exp_d)) begin failures++; $display("FAIL emit"); end
      checks++;
      if (overflow) begin failures++; $display("FAIL early overflow"); end
    end
    // consumer not ready while a word is emitted
    @(negedge clk); en = 1; word = '{valid: 1, data: 32'h1234}; out_ready = 0;
    @(negedge clk); en = 0; word = '0;
    @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not set"); end
    out_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not sticky"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
