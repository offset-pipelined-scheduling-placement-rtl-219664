// tb_ops_retime: drives a random stream and checks that each of the delay
// settings 0..3 returns the value from exactly that many cycles earlier.
module tb_ops_retime;
  logic clk = 0, rst_n = 0;
  logic [1:0] dly;
  logic [32:0] d, q;
  logic [32:0] hist [4];
  int checks = 0, failures = 0;
  ops_retime #(.WIDTH(33), .MAXD(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    dly = 0; d = '0;
    for (int i = 0; i < 4; i++) hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      d = {1'($urandom), 32'($urandom)};
      hist[0] = d;
      dly = 2'(i / 1000);
      #1;
      if (i % 1000 > 3) begin
        checks++;
        if (q !== hist[dly]) begin failures++; $display("FAIL dly=%0d q=%h exp=%h", dly, q, hist[dly]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
