// tb_ops_cgra_top: end-to-end run of the branching CGRA at its default size.
//
// Application: the input stream of domain 0 carries packets v1..vk,0 (all
// vi nonzero). For each packet the array outputs 3*(v1+...+vk) on domain 3's
// output stream and stores it at address p (packet number, from 1) of
// domain 3's memory. It uses the three-mode transition graph
// A -> B, B -> B | C, C -> A with initiation intervals 2, 2, 3, preceded by
// a one-cycle init mode I:
//   A: domain 0 pops v1 and sends it east; domain 1 starts the sum.
//   B: domain 0 pops the next word and sends it; domain 1 adds it to the
//      sum (a two-ALU feedback loop); when the word is 0 the leader
//      branches to C.
//   C: domain 1 sends the sum east through domain 2 (pass-through) to
//      domain 3, which multiplies by 3 (two-cycle multiply), streams the
//      result out and writes it to memory at its packet counter, kept in
//      its register file.
// Offsets: domain 0 leads (0), domain 1 follows it by 3, domain 2 follows
// domain 1 by 1 and domain 3 follows domain 2 by 2. The 3-cycle neighbour
// transfer from domain 0 lands in domain 1 one slot late, so domain 1's
// west input uses a 2-cycle retiming chain. Domain 12 runs independently as
// a modulo counter (II = 2), passing its input stream through its memory to
// its output stream. The leader is stopped after one A iteration following
// the last packet, because domain 3 emits a result in the A slot after C.
// Checked: every result and memory word, the modulo stream, the follower
// program counters against the leader's (delayed by their offsets), the
// cycle distance between results (2 + 2k + 3 for a packet of k values), and
// that each mechanism occurred: mode switch, inter-domain transfer,
// pass-through routing, retiming, multiply, register file write, memory
// write and read, stream in and out, modulo counting, and results produced
// after the leader stopped (epilogue).
module tb_ops_cgra_top;
  import ops_pkg::*;
  import ops_tb_pkg::*;
  localparam int ROWS = 5, COLS = 5, ND = ROWS * COLS, DW = $clog2(ND);
  localparam int D0 = 0, D1 = 1, DP = 2, D2 = 3, DM = 12;
  // instruction addresses of the modes
  localparam int A0 = 0, B0 = 2, C0 = 4, I0 = 7, M0 = 8;

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

  ops_cgra_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ workload
  localparam int NPKT = 60;
  localparam int MAXW = NPKT * 8;
  logic [31:0] words [MAXW];
  logic [31:0] results [NPKT];
  int pkt_len [NPKT];
  int nwords = 0;
  localparam int NMOD = 100;
  logic [31:0] mod_in [NMOD];

  // ------------------------------------------------------------ configuration
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
    s.start_mode = 3;  // I
    s.modes[0] = '{base: A0, last: A0 + 1, next_nt: 1, next_t: 1};  // A -> B
    s.modes[1] = '{base: B0, last: B0 + 1, next_nt: 1, next_t: 2};  // B -> B | C
    s.modes[2] = '{base: C0, last: C0 + 2, next_nt: 0, next_t: 0};  // C -> A
    s.modes[3] = '{base: I0, last: I0,     next_nt: 0, next_t: 0};  // I -> A
    return s;
  endfunction

  task automatic configure();
    instr_t x;
    static_cfg_t s;
    // ---- domain 0, leader: pops, forwards east, decides the branch
    for (int a = 0; a < 8; a++) begin
      x = '0;
      if (a == A0 || a == B0) begin            // slot 0 of A and B
        x.sin_pop = 1;
        x.wsel[WK_EXIT0] = WS_SIN;
        x.alu_op[1] = ALU_EQ;                   // peeked word == 0 ?
        x.bsel[BK_PCBR] = BS_ALU1F;
      end
      if (a == A0 + 1 || a == B0 + 1) x.sbw[sb_out(DIR_E, 0)] = sb_exit(0);
      if (a == A0 + 1 || a == B0 + 1 || a == C0 + 2 || a == I0) begin  // last slots: peek
        x.wsel[WK_ALU1A] = WS_SIN; x.wsel[WK_ALU1B] = WS_CONST; x.imm = 0;
      end
      wr_instr(D0, a, x);
    end
    wr_static(D0, graph(PC_LEADER, DIR_N, 0));
    // ---- domain 1: running sum in a loop ALU0 (add, slot 0) -> ALU1 (pass, slot 1)
    for (int a = 0; a < 8; a++) begin
      x = '0;
      if (a == A0 || a == B0 || a == C0) begin
        x.alu_op[0] = ALU_ADD;
        x.wsel[WK_ALU1A] = WS_ALU0;
      end
      if (a == A0 + 1 || a == B0 + 1 || a == C0 + 1) x.alu_op[1] = ALU_PASS;
      if (a == A0 + 1) begin x.wsel[WK_ALU0A] = ws_in(DIR_W, 0); x.wsel[WK_ALU0B] = WS_CONST; x.imm = 0; end
      if (a == B0 + 1) begin x.wsel[WK_ALU0A] = ws_in(DIR_W, 0); x.wsel[WK_ALU0B] = WS_ALU1; end
      if (a == C0 + 1) x.wsel[WK_EXIT0] = WS_ALU1;
      if (a == C0 + 2) x.sbw[sb_out(DIR_E, 0)] = sb_exit(0);
      wr_instr(D1, a, x);
    end
    s = graph(PC_FOLLOWER, DIR_W, 3);
    s.rt_w[in_idx(DIR_W, 0)] = 2;
    wr_static(D1, s);
    // ---- domain 2: pass-through, west track 0 -> east track 0 in every slot
    for (int a = 0; a < 8; a++) begin
      x = '0;
      x.sbw[sb_out(DIR_E, 0)] = sb_in(DIR_W, 0);
      wr_instr(DP, a, x);
    end
    wr_static(DP, graph(PC_FOLLOWER, DIR_W, 1));
    // ---- domain 3: y = 3 * sum, stream out, memory[count] = y
    for (int a = 0; a < 8; a++) begin
      x = '0;
      x.rf_raddr = 1; x.rf_waddr = 1;
      case (a)
        I0:     begin x.wsel[WK_RFW] = WS_CONST; x.imm = 0; end          // count = 0
        C0:     begin x.wsel[WK_ALU1A] = WS_RF; x.wsel[WK_ALU1B] = WS_CONST; x.imm = 1; end
        C0 + 1: begin x.alu_op[1] = ALU_ADD; x.wsel[WK_RFW] = WS_ALU1;
                      x.wsel[WK_ALU0A] = ws_in(DIR_W, 0); x.wsel[WK_ALU0B] = WS_CONST; x.imm = 3; end
        C0 + 2: x.alu_op[0] = ALU_MUL;
        A0:     begin x.wsel[WK_SOUT] = WS_ALU0; x.wsel[WK_MDATA] = WS_ALU0;
                      x.wsel[WK_MADDR] = WS_RF; x.bsel[BK_MWE] = BS_ONE; end
        default: ;
      endcase
      wr_instr(D2, a, x);
    end
    wr_static(D2, graph(PC_FOLLOWER, DIR_W, 2));
    // ---- domain 12: modulo counter, stream -> memory[7] -> stream
    // slot 0: pop x, write it to address 0; ALU0 forms address 0 carrying x's valid bit
    x = '0;
    x.sin_pop = 1; x.wsel[WK_MDATA] = WS_SIN; x.wsel[WK_MADDR] = WS_CONST; x.imm = 0;
    x.bsel[BK_MWE] = BS_ONE;
    x.wsel[WK_ALU0A] = WS_SIN; x.wsel[WK_ALU0B] = WS_CONST;
    wr_instr(DM, M0, x);
    // slot 1: read address 0 only when a word was popped; last read -> output
    x = '0;
    x.alu_op[0] = ALU_AND; x.wsel[WK_MADDR] = WS_ALU0; x.wsel[WK_SOUT] = WS_MEM;
    wr_instr(DM, M0 + 1, x);
    s = '0;
    s.role = PC_MODULO; s.start_mode = 4;
    s.modes[4] = '{base: M0, last: M0 + 1, next_nt: 4, next_t: 4};
    wr_static(DM, s);
  endtask

  // ------------------------------------------------------------ streams
  int n_in = 0, n_mod_in = 0, n_res = 0, n_mod_out = 0;
  int cyc = 0, last_res_cyc = -1;
  logic producing;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb begin
    sin_valid = '0; sin_data = '0;
    sin_valid[D0] = producing && (n_in < nwords);
    sin_data[D0]  = (n_in < nwords) ? words[n_in] : '0;
    sin_valid[DM] = producing && (n_mod_in < NMOD);
    sin_data[DM]  = (n_mod_in < NMOD) ? mod_in[n_mod_in] : '0;
  end
  assign sout_ready = '1;

  // mechanism counters
  int c_switch = 0, c_xfer = 0, c_pass = 0, c_rfw = 0, c_memw = 0, c_memr = 0;
  int c_rt = 0, c_mul = 0, c_epi = 0, c_mod = 0, c_sin = 0, c_fol = 0;
  pcbus_t lead_hist [8];

  always @(posedge clk) if (rst_n) begin
    if (sin_valid[D0] && sin_ready[D0]) begin n_in <= n_in + 1; c_sin++; end
    if (sin_valid[DM] && sin_ready[DM]) n_mod_in <= n_mod_in + 1;
    if (mode_switch[D0]) c_switch++;
    if (dut.g_row[0].g_col[0].u_dom.wout[DIR_E][0].valid) c_xfer++;
    if (dut.g_row[0].g_col[2].u_dom.wout[DIR_E][0].valid) c_pass++;
    if (dut.g_row[0].g_col[3].u_dom.u_rf.en && dut.g_row[0].g_col[3].u_dom.u_rf.wdata.valid) c_rfw++;
    if (dut.g_row[0].g_col[3].u_dom.g_unit[0].u_alu.mul_q.valid) c_mul++;
    if (dut.g_row[0].g_col[3].u_dom.u_mem.en && dut.g_row[0].g_col[3].u_dom.u_mem.we &&
        dut.g_row[0].g_col[3].u_dom.u_mem.addr.valid && dut.g_row[0].g_col[3].u_dom.u_mem.wdata.valid) c_memw++;
    if (dut.g_row[2].g_col[2].u_dom.u_mem.rdata.valid) c_memr++;
    if (pc_obs[DM].valid) c_mod++;
    if (dut.g_row[0].g_col[1].u_dom.win_rt[in_idx(DIR_W, 0)].valid) c_rt++;
    // followers: delayed copies of the leader's program counter
    for (int k = 7; k > 0; k--) lead_hist[k] = lead_hist[k-1];
    lead_hist[0] = pc_obs[D0];
    chk("domain 1 offset 3", pc_obs[D1] == lead_hist[3]);
    chk("domain 2 offset 4", pc_obs[DP] == lead_hist[4]);
    chk("domain 3 offset 6", pc_obs[D2] == lead_hist[6]);
    if (pc_obs[D2].valid) c_fol++;
    if (sout_valid[D2]) begin
      chk("result value", n_res < NPKT && sout_data[D2] == results[n_res]);
      if (last_res_cyc >= 0 && n_res < NPKT)
        chk("cycles between results = 5 + 2k", cyc - last_res_cyc == 5 + 2 * pkt_len[n_res]);
      if (!pc_obs[D0].valid) c_epi++;
      last_res_cyc <= cyc;
      n_res <= n_res + 1;
    end
    if (sout_valid[DM]) begin
      chk("modulo stream value", n_mod_out < NMOD && sout_data[DM] == mod_in[n_mod_out]);
      if (n_mod_out < NMOD && sout_data[DM] != mod_in[n_mod_out]) $display("mod %0d got %h exp %h", n_mod_out, sout_data[DM], mod_in[n_mod_out]);
      n_mod_out <= n_mod_out + 1;
    end
  end

  initial begin
    int k;
    cfg_we = 0; cfg_static = 0; cfg_dom = 0; cfg_addr = 0; cfg_instr = '0; cfg_scfg = '0;
    run = 0; producing = 0;
    for (int i = 0; i < 8; i++) lead_hist[i] = '0;
    for (int p = 0; p < NPKT; p++) begin
      logic [31:0] sum;
      k = (p % 7 == 0) ? 1 : $urandom_range(1, 6);
      pkt_len[p] = k; sum = 0;
      for (int i = 0; i < k; i++) begin
        words[nwords] = $urandom_range(1, 100000);
        sum += words[nwords];
        nwords++;
      end
      words[nwords++] = 0;
      results[p] = 3 * sum;
    end
    for (int i = 0; i < NMOD; i++) mod_in[i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    configure();
    producing = 1;
    @(negedge clk);
    run = 1;
    // stop the leader at the end of the last packet's C iteration
    forever begin
      @(negedge clk);
      if (n_in == nwords && pc_obs[D0].valid && pc_obs[D0].pc == PC_W'(C0 + 2)) break;
    end
    // one more A iteration: domain 3 emits the last result in its A slot
    forever begin
      @(negedge clk);
      if (pc_obs[D0].valid && pc_obs[D0].pc == PC_W'(A0 + 1)) break;
    end
    run = 0;
    repeat (40) @(negedge clk);
    $display("n_res=%0d n_mod_out=%0d", n_res, n_mod_out);
    chk("all results", n_res == NPKT);
    chk("all modulo words", n_mod_out == NMOD);
    for (int p = 0; p < NPKT; p++)
      chk("memory word", dut.g_row[0].g_col[3].u_dom.u_mem.mem[p + 1] == results[p]);
    chk("no underflow/overflow", sout_overflow == '0);
    $display("retimed words=%0d mode switches=%0d transfers=%0d pass-through=%0d rf writes=%0d multiplies=%0d",
             c_rt, c_switch, c_xfer, c_pass, c_rfw, c_mul);
    $display("memory writes=%0d memory reads=%0d stream words in=%0d follower cycles=%0d modulo cycles=%0d epilogue results=%0d",
             c_memw, c_memr, c_sin, c_fol, c_mod, c_epi);
    chk("mode switch happened", c_switch > 0);
    chk("inter-domain transfer happened", c_xfer > 0);
    chk("pass-through happened", c_pass > 0);
    chk("retiming chain used", c_rt > 0);
    chk("register file write happened", c_rfw > 0);
    chk("multiply happened", c_mul > 0);
    chk("memory write happened", c_memw > 0);
    chk("memory read happened", c_memr > 0);
    chk("stream input happened", c_sin > 0);
    chk("follower execution happened", c_fol > 0);
    chk("modulo counting happened", c_mod > 0);
    chk("epilogue result happened", c_epi > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
