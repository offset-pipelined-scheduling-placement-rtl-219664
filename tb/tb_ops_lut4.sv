// tb_ops_lut4: exhaustive check of the 4-input LUT for random truth tables
// and the four basic gates.
module tb_ops_lut4;
  logic [15:0] tt;
  logic [3:0] in;
  logic out;
  int checks = 0, failures = 0;
  ops_lut4 dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [15:0] tabs [4];
    tabs[0] = 16'h8000;  // AND4
    tabs[1] = 16'hfffe;  // OR4
    tabs[2] = 16'h6996;  // XOR4
    tabs[3] = $urandom;
    for (int t = 0; t < 40; t++) begin
      tt = (t < 4) ? tabs[t] : 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        logic expect_o;
        in = 4'(i);
        #1;
        case (t)
          0: expect_o = &in;
          1: expect_o = |in;
          2: expect_o = ^in;
          default: expect_o = (tt >> i) & 1'b1;
        endcase
        checks++;
        if (out !== expect_o) begin failures++; $display("FAIL tt=%h in=%b", tt, in); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
