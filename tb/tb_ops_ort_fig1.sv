// tb_ops_ort_fig1: issue-slot pattern of a lead domain (offset 0) and a
// follower (offset 2) for three modes with II = 2, 3 and 1.
//
// The leader cycles through the modes. For every leader iteration starting
// at cycle T in mode m, the testbench records at which cycles T + k each
// domain issues an instruction of mode m, and builds the table of issue slots
// per domain and mode. Expected: the leader issues at k = 0..II-1 and the
// follower at k = 2..II+1:
//   time  d0: m0 m1 m2   d1: m0 m1 m2
//    0        x  x  x
//    1        x  x
//    2           x          x  x  x
//    3                      x  x
//    4                         x
module tb_ops_ort_fig1;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, run;
  static_cfg_t cfg_l, cfg_f;
  pcbus_t [NDIR-1:0] pcin_l, pcin_f;
  pcbus_t pc_l, pc_f;
  logic [MODE_W-1:0] mode_l, mode_f;
  logic sw_l, sw_f;
  int checks = 0, failures = 0;

  ops_pc_unit u_lead (.clk, .rst_n, .cfg(cfg_l), .run, .br(1'b0), .pc_in(pcin_l), .pc_out(pc_l), .mode(mode_l), .mode_switch(sw_l));
  ops_pc_unit u_fol  (.clk, .rst_n, .cfg(cfg_f), .run, .br(1'b0), .pc_in(pcin_f), .pc_out(pc_f), .mode(mode_f), .mode_switch(sw_f));
  always #5 clk = ~clk;
  assign pcin_l = '0;
  always_comb begin pcin_f = '0; pcin_f[DIR_E] = pc_l; end

  int ii   [3] = '{2, 3, 1};
  int base [3] = '{0, 2, 5};
  // table[domain][mode] bit k: domain issues an instruction of the mode k cycles after the leader's iteration start
  logic [7:0] table_q [2][3];
  logic [7:0] expect_t [2][3];

  function automatic int mode_of(logic [7:0] pc);
    for (int m = 0; m < 3; m++) if (pc >= 8'(base[m]) && pc < 8'(base[m] + ii[m])) return m;
    return -1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_start [$];
    int m_start [$];
    pcbus_t trace_l [400], trace_f [400];
    cfg_l = '0;
    cfg_l.role = PC_LEADER; cfg_l.start_mode = 0;
    for (int m = 0; m < 3; m++)
      cfg_l.modes[m] = '{base: 8'(base[m]), last: 8'(base[m] + ii[m] - 1),
                         next_nt: MODE_W'((m + 1) % 3), next_t: MODE_W'((m + 1) % 3)};
    cfg_f = cfg_l; cfg_f.role = PC_FOLLOWER; cfg_f.pc_src = DIR_E; cfg_f.pc_delay = 2;
    run = 0;
    for (int d = 0; d < 2; d++) for (int m = 0; m < 3; m++) begin
      table_q[d][m] = '0;
      expect_t[d][m] = 8'(((1 << ii[m]) - 1) << (2 * d));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); run = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      trace_l[c] = pc_l; trace_f[c] = pc_f;
    end
    // iteration starts of the leader
    for (int c = 0; c < 390; c++)
      if (trace_l[c].valid && mode_of(trace_l[c].pc) >= 0 && trace_l[c].pc == 8'(base[mode_of(trace_l[c].pc)])) begin
        int m;
        m = mode_of(trace_l[c].pc);
        for (int k = 0; k < 8; k++) begin
          if (k < ii[m] && trace_l[c + k].valid && trace_l[c + k].pc == 8'(base[m] + k)) table_q[0][m][k] = 1'b1;
          for (int j = 0; j < ii[m]; j++)
            if (k >= 2 && trace_f[c + k].valid && k - 2 == j && trace_f[c + k].pc == 8'(base[m] + j)) table_q[1][m][k] = 1'b1;
        end
        // the follower issues exactly the leader's slot two cycles later
        for (int j = 0; j < ii[m]; j++) begin
          checks++;
          if (trace_f[c + 2 + j] != trace_l[c + j]) begin failures++; $display("FAIL follower slot m=%0d j=%0d", m, j); end
        end
      end
    for (int d = 0; d < 2; d++) for (int m = 0; m < 3; m++) begin
      checks++;
      if (table_q[d][m] != expect_t[d][m]) begin
        failures++; $display("FAIL table d%0d m%0d: %b vs %b", d, m, table_q[d][m], expect_t[d][m]);
      end
    end
    $display("time  d0: m0 m1 m2   d1: m0 m1 m2");
    for (int k = 0; k < 5; k++)
      $display(" %0d        %s  %s  %s      %s  %s  %s", k,
               table_q[0][0][k] ? "x" : ".", table_q[0][1][k] ? "x" : ".", table_q[0][2][k] ? "x" : ".",
               table_q[1][0][k] ? "x" : ".", table_q[1][1][k] ? "x" : ".", table_q[1][2][k] ? "x" : ".");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
