// tb_ops_fig5_join: two-path mode graph A -> (B | C) -> D -> A, all II = 2,
// on a 1 x 2 array (domain 0 leads, domain 1 follows with offset 3).
//
// Per round, mode A pops x on domain 0 and sends it east; the leader branches
// to C when x is odd, to B otherwise. Domain 1 parks x in register 2 (its
// consumer, in D, is reached through either path) and computes
// y = x + 100 in B or y = 2x in C into register 3: a value with two possible
// producers that must arrive at the same place. In D both registers are read
// and x + y is streamed out in the following A slot. The testbench checks
// every output, that both paths were taken, and the round length of 6 cycles.
module tb_ops_fig5_join;
  import ops_pkg::*;
  import ops_tb_pkg::*;
  localparam int ND = 2, DW = 1;
  localparam int A0 = 0, B0 = 2, C0 = 4, D0M = 6;

  logic clk = 0, rst_n = 0, run;
  logic cfg_we, cfg_static;
  logic [DW-1:0] cfg_dom;
  logic [PC_W-1:0] cfg_addr;
  instr_t cfg_instr;
  static_cfg_t cfg_scfg;
  logic [ND-1:0] sin_valid, sin_ready, sin_underflow, sout_valid, sout_ready, sout_overflow;
  logic [ND-1:0][W-1:0] sin_data, sout_data;
  pcbus_t [ND-1:0] pc_obs;
  logic [ND-1:0][MODE_W-1:0] mode_obs;
  logic [ND-1:0] mode_switch;

  ops_cgra_top #(.ROWS(1), .COLS(2)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr_instr(int d, int a, instr_t x);
    @(negedge clk);
    cfg_we = 1; cfg_static = 0; cfg_dom = DW'(d); cfg_addr = PC_W'(a); cfg_instr = x;
    @(negedge clk);
    cfg_we = 0;
  endtask
  task automatic wr_static(int d, static_cfg_t s);
    @(negedge clk);
    cfg_we = 1; cfg_static = 1; cfg_dom = DW'(d); cfg_scfg = s;
    @(negedge clk);
    cfg_we = 0; cfg_static = 0;
  endtask
  function automatic static_cfg_t graph(pc_role_e role, dir_e src, int dly);
    static_cfg_t s;
    s = '0;
    s.role = role; s.pc_src = src; s.pc_delay = PCDLY_W'(dly);
    s.start_mode = 3;  // D: its last slot prepares the first branch test
    s.modes[0] = '{base: A0,  last: A0 + 1,  next_nt: 1, next_t: 2};  // A -> B | C
    s.modes[1] = '{base: B0,  last: B0 + 1,  next_nt: 3, next_t: 3};  // B -> D
    s.modes[2] = '{base: C0,  last: C0 + 1,  next_nt: 3, next_t: 3};  // C -> D
    s.modes[3] = '{base: D0M, last: D0M + 1, next_nt: 0, next_t: 0};  // D -> A
    return s;
  endfunction

  localparam int NX = 120;
  logic [31:0] xs [NX], exp_out [NX];
  int n_in = 0, n_out = 0, n_b = 0, n_c = 0, cyc = 0, last_cyc = -1;
  logic producing = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb begin
    sin_valid = '0; sin_data = '0;
    sin_valid[0] = producing && (n_in < NX);
    sin_data[0]  = (n_in < NX) ? xs[n_in] : '0;
  end
  assign sout_ready = '1;

  always @(posedge clk) if (rst_n) begin
    if (sin_valid[0] && sin_ready[0]) n_in <= n_in + 1;
    if (pc_obs[0].valid && pc_obs[0].pc == PC_W'(B0)) n_b++;
    if (pc_obs[0].valid && pc_obs[0].pc == PC_W'(C0)) n_c++;
    // After the input runs dry the registers still hold the last round's
    // values, so further rounds repeat the last result; only the first NX
    // outputs are checked.
    if (sout_valid[1] && n_out < NX) begin
      chk("joined result", sout_data[1] == exp_out[n_out]);
      if (last_cyc >= 0) chk("one round per 6 cycles", cyc - last_cyc == 6);
      last_cyc <= cyc;
      n_out <= n_out + 1;
    end
  end

  initial begin
    instr_t x;
    static_cfg_t s;
    cfg_we = 0; cfg_static = 0; cfg_dom = 0; cfg_addr = 0; cfg_instr = '0; cfg_scfg = '0;
    run = 0;
    for (int i = 0; i < NX; i++) begin
      xs[i] = $urandom_range(1, 1 << 20);
      exp_out[i] = xs[i] + ((xs[i] & 1) ? 2 * xs[i] : xs[i] + 100);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // domain 0: pop in A, forward east, test x & 1 for the A -> B | C branch
    for (int a = 0; a < 8; a++) begin
      x = '0;
      if (a == A0) begin
        x.sin_pop = 1; x.wsel[WK_EXIT0] = WS_SIN;
        x.alu_op[1] = ALU_AND; x.bsel[BK_PCBR] = BS_ALU1F;
      end
      if (a == A0 + 1) x.sbw[sb_out(DIR_E, 0)] = sb_exit(0);
      if (a == D0M + 1) begin x.wsel[WK_ALU1A] = WS_SIN; x.wsel[WK_ALU1B] = WS_CONST; x.imm = 1; end
      wr_instr(0, a, x);
    end
    wr_static(0, graph(PC_LEADER, DIR_N, 0));
    // domain 1
    for (int a = 0; a < 8; a++) begin
      x = '0;
      case (a)
        A0:      begin x.alu_op[0] = ALU_ADD; x.wsel[WK_SOUT] = WS_ALU0; end   // x + y of the last round
        A0 + 1:  begin x.wsel[WK_RFW] = ws_in(DIR_W, 0);                    // park x
                       x.wsel[WK_ALU0A] = ws_in(DIR_W, 0); x.wsel[WK_ALU0B] = WS_CONST; x.imm = 100;
                       x.wsel[WK_ALU1A] = ws_in(DIR_W, 0); x.wsel[WK_ALU1B] = ws_in(DIR_W, 0); end
        B0:      begin x.rf_waddr = 2; x.alu_op[0] = ALU_ADD; x.wsel[WK_RFW] = WS_ALU0; end
        B0 + 1:  x.rf_waddr = 3;
        C0:      begin x.rf_waddr = 2; x.alu_op[1] = ALU_ADD; x.wsel[WK_RFW] = WS_ALU1; end
        C0 + 1:  x.rf_waddr = 3;
        D0M:     begin x.rf_raddr = 2; x.wsel[WK_ALU1A] = WS_RF; end
        D0M + 1: begin x.rf_raddr = 3; x.alu_op[1] = ALU_PASS;
                       x.wsel[WK_ALU0A] = WS_ALU1; x.wsel[WK_ALU0B] = WS_RF; end
        default: ;
      endcase
      wr_instr(1, a, x);
    end
    s = graph(PC_FOLLOWER, DIR_W, 3);
    s.rt_w[in_idx(DIR_W, 0)] = 2;
    wr_static(1, s);
    producing = 1;
    @(negedge clk); run = 1;
    wait (n_out == NX);
    repeat (4) @(negedge clk);
    run = 0;
    repeat (20) @(negedge clk);
    chk("all results", n_out == NX);
    chk("path through B taken", n_b > 0);
    chk("path through C taken", n_c > 0);
    $display("rounds via B=%0d via C=%0d outputs=%0d", n_b, n_c, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
