// ops_domain: one control domain (resource cluster) of the branching CGRA.
//
// A domain holds two 32-bit ALUs, two 4-input LUTs, a 4 KB memory, an 8-entry
// register file, a program counter, an input and an output stream port, a
// 256-entry instruction store, a registered word crossbar (33-bit words: data
// plus valid), a registered bit crossbar, and a switch box that drives
// TRACKS word tracks and TRACKS bit tracks toward each of the four
// neighbours. Every incoming track passes a 0..3 cycle retiming chain.
//
// Each cycle the domain executes the instruction at its program counter: the
// instruction gives every crossbar sink and every outgoing track its source,
// the ALU operations, the LUT truth tables, the register file addresses, a
// 32-bit constant and whether the input stream word is consumed. All
// multiplexer outputs are registered, so
//  * a value moves between units of the same domain in one cycle;
//  * a value reaches a unit of a neighbour in three cycles: crossbar exit
//    register, switch box register, then (after the neighbour's retiming
//    chain, 0 cycles at least) the neighbour's crossbar register;
//  * passing through a domain costs one switch box register per hop.
// While the program counter is not valid the domain executes the all-zero
// instruction: nothing is routed and nothing is written.
//
// Configuration: cfg_we with cfg_static loads the static configuration
// (program counter role, offset step, mode table, retiming delays); cfg_we
// without it writes instruction cfg_addr.
//
// The unit mix, the 8-bit program counter, the word/bit interconnect split,
// the register-at-mux-output rule, the retiming range and the three-cycle
// neighbour latency follow the architecture description. Source and sink
// lists, two exit ports per width, full crossbars and the switch box
// organisation are this design's own (see ops_pkg).
module ops_domain
  import ops_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration load
  input  logic                          cfg_we,
  input  logic                          cfg_static,
  input  logic [PC_W-1:0]               cfg_addr,
  input  instr_t                        cfg_instr,
  input  static_cfg_t                   cfg_scfg,
  // control
  input  logic                          run,
  input  pcbus_t [NDIR-1:0]             pc_in,
  output pcbus_t                        pc_out,
  output logic [MODE_W-1:0]             mode,
  output logic                          mode_switch,
  // inter-domain tracks, indexed [direction][track]
  input  word_t  [NDIR-1:0][TRACKS-1:0] win,
  output word_t  [NDIR-1:0][TRACKS-1:0] wout,
  input  logic   [NDIR-1:0][TRACKS-1:0] bin,
  output logic   [NDIR-1:0][TRACKS-1:0] bout,
  // stream ports
  input  logic                          sin_valid,
  input  logic [W-1:0]                  sin_data,
  output logic                          sin_ready,
  output logic                          sin_underflow,
  output logic                          sout_valid,
  output logic [W-1:0]                  sout_data,
  input  logic                          sout_ready,
  output logic                          sout_overflow
);
  localparam int unsigned WB = $bits(word_t);

  static_cfg_t scfg;
  instr_t      instr;
  logic        en;

  logic [NWSRC-1:0][WB-1:0]  wsrc;
  logic [NWSNK-1:0][WB-1:0]  wsnk;
  logic [NBSRC-1:0]          bsrc;
  logic [NBSNK-1:0]          bsnk;
  logic [NSBSRC-1:0][WB-1:0] sbw_src;
  logic [NSBSRC-1:0]         sbb_src;
  logic [NOUT-1:0][WB-1:0]   sbw_out;
  logic [NOUT-1:0]           sbb_out;
  word_t [NIN-1:0]           win_rt;
  logic  [NIN-1:0]           bin_rt;
  word_t                     alu_y [2];
  logic                      alu_f [2];
  logic                      lut_o [2];
  word_t                     mem_rd, rf_rd, sin_word;

  // ---------------------------------------------------------------- static configuration
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   scfg <= '0;
    else if (cfg_we && cfg_static) scfg <= cfg_scfg;
  end

  // ---------------------------------------------------------------- control
  ops_config_mem u_cmem (
    .clk, .we(cfg_we && !cfg_static), .waddr(cfg_addr), .wdata(cfg_instr),
    .pc(pc_out), .instr
  );

  ops_pc_unit u_pc (
    .clk, .rst_n, .cfg(scfg), .run, .br(bsnk[BK_PCBR]), .pc_in, .pc_out,
    .mode, .mode_switch
  );

  assign en = pc_out.valid;

  // ---------------------------------------------------------------- input retiming chains
  for (genvar i = 0; i < NIN; i++) begin : g_rt
    ops_retime #(.WIDTH(WB)) u_rtw (
      .clk, .rst_n, .dly(scfg.rt_w[i]), .d(win[i / TRACKS][i % TRACKS]), .q(win_rt[i])
    );
    ops_retime #(.WIDTH(1)) u_rtb (
      .clk, .rst_n, .dly(scfg.rt_b[i]), .d(bin[i / TRACKS][i % TRACKS]), .q(bin_rt[i])
    );
  end

  // ---------------------------------------------------------------- crossbars
  always_comb begin
    wsrc           = '0;
    wsrc[WS_CONST] = {1'b1, instr.imm};
    wsrc[WS_ALU0]  = alu_y[0];
    wsrc[WS_ALU1]  = alu_y[1];
    wsrc[WS_MEM]   = mem_rd;
    wsrc[WS_RF]    = rf_rd;
    wsrc[WS_SIN]   = sin_word;
    for (int i = 0; i < NIN; i++) wsrc[WS_IN0 + i] = win_rt[i];

    bsrc           = '0;
    bsrc[BS_ONE]   = 1'b1;
    bsrc[BS_ALU0F] = alu_f[0];
    bsrc[BS_ALU1F] = alu_f[1];
    bsrc[BS_LUT0]  = lut_o[0];
    bsrc[BS_LUT1]  = lut_o[1];
    for (int i = 0; i < NIN; i++) bsrc[BS_IN0 + i] = bin_rt[i];
  end

  ops_xbar #(.NSRC(NWSRC), .NSNK(NWSNK), .WIDTH(WB)) u_wxbar (
    .clk, .rst_n, .sel(instr.wsel), .src(wsrc), .snk(wsnk)
  );
  ops_xbar #(.NSRC(NBSRC), .NSNK(NBSNK), .WIDTH(1)) u_bxbar (
    .clk, .rst_n, .sel(instr.bsel), .src(bsrc), .snk(bsnk)
  );

  // ---------------------------------------------------------------- functional units
  for (genvar u = 0; u < 2; u++) begin : g_unit
    ops_alu u_alu (
      .clk, .rst_n, .op(instr.alu_op[u]),
      .a(wsnk[WK_ALU0A + 2*u]), .b(wsnk[WK_ALU0B + 2*u]), .ctrl(bsnk[BK_ALU0C + u]),
      .y(alu_y[u]), .flag(alu_f[u])
    );
    ops_lut4 u_lut (
      .tt(instr.lut_tt[u]), .in(bsnk[BK_LUT0 + 4*u +: 4]), .out(lut_o[u])
    );
  end

  ops_mem u_mem (
    .clk, .rst_n, .en, .addr(wsnk[WK_MADDR]), .wdata(wsnk[WK_MDATA]),
    .we(bsnk[BK_MWE]), .rdata(mem_rd)
  );

  ops_regfile u_rf (
    .clk, .rst_n, .en, .raddr(instr.rf_raddr), .waddr(instr.rf_waddr),
    .wdata(wsnk[WK_RFW]), .rdata(rf_rd)
  );

  ops_stream_in u_sin (
    .clk, .rst_n, .in_valid(sin_valid), .in_data(sin_data), .in_ready(sin_ready),
    .pop(en && instr.sin_pop), .word(sin_word), .underflow(sin_underflow)
  );

  ops_stream_out u_sout (
    .clk, .rst_n, .en, .word(wsnk[WK_SOUT]), .out_valid(sout_valid),
    .out_data(sout_data), .out_ready(sout_ready), .overflow(sout_overflow)
  );

  // ---------------------------------------------------------------- switch box
  always_comb begin
    sbw_src = '0;
    sbb_src = '0;
    for (int i = 0; i < NIN; i++) begin
      sbw_src[1 + i] = win_rt[i];
      sbb_src[1 + i] = bin_rt[i];
    end
    for (int e = 0; e < NEXIT; e++) begin
      sbw_src[1 + NIN + e] = wsnk[WK_EXIT0 + e];
      sbb_src[1 + NIN + e] = bsnk[BK_EXIT0 + e];
    end
  end

  ops_xbar #(.NSRC(NSBSRC), .NSNK(NOUT), .WIDTH(WB)) u_sbw (
    .clk, .rst_n, .sel(instr.sbw), .src(sbw_src), .snk(sbw_out)
  );
  ops_xbar #(.NSRC(NSBSRC), .NSNK(NOUT), .WIDTH(1)) u_sbb (
    .clk, .rst_n, .sel(instr.sbb), .src(sbb_src), .snk(sbb_out)
  );

  always_comb begin
    for (int i = 0; i < NOUT; i++) begin
      wout[i / TRACKS][i % TRACKS] = sbw_out[i];
      bout[i / TRACKS][i % TRACKS] = sbb_out[i];
    end
  end
endmodule
