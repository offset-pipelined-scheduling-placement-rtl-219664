// tb_ops_xbar: random selects and sources; every sink must show the selected
// source one clock later, and out-of-range selects give zero.
module tb_ops_xbar;
  localparam int NSRC = 27, NSNK = 10, WIDTH = 33, SELW = 5;
  logic clk = 0, rst_n = 0;
  logic [NSNK-1:0][SELW-1:0] sel;
  logic [NSRC-1:0][WIDTH-1:0] src;
  logic [NSNK-1:0][WIDTH-1:0] snk, expect_q;
  int checks = 0, failures = 0;
  ops_xbar #(.NSRC(NSRC), .NSNK(NSNK), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    sel = '0; src = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int k = 0; k < NSNK; k++) sel[k] = SELW'($urandom_range(31));
      for (int s = 0; s < NSRC; s++) src[s] = {1'($urandom), 32'($urandom)};
      for (int k = 0; k < NSNK; k++) expect_q[k] = (sel[k] < NSRC) ? src[sel[k]] : '0;
      @(negedge clk);
      src = '0;
      for (int k = 0; k < NSNK; k++) begin
        checks++;
        if (snk[k] !== expect_q[k]) begin failures++; $display("FAIL sink %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
