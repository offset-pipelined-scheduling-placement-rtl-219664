// ops_cgra_top: branching CGRA with pipelined program counters.
//
// A ROWS x COLS mesh of ops_domain. Neighbouring domains are joined by
// TRACKS word tracks and TRACKS bit tracks in each direction and by a
// dedicated program counter link. One domain is configured as leader and
// sequences the modes of the application; the others follow a neighbour's
// program counter a configured number of cycles later, so every domain runs
// the leader's mode sequence at its own fixed offset. Tracks and program
// counter links at the array edge are tied off.
//
// Domain (r, c) has index r*COLS + c in every per-domain port. The
// configuration bus writes one domain at a time: cfg_static selects the
// static configuration, otherwise instruction cfg_addr is written. The mesh
// shape and the 25-domain default are this design's choice, the default
// being the largest device of the evaluation.
module ops_cgra_top
  import ops_pkg::*;
#(
  parameter int unsigned ROWS = 5,
  parameter int unsigned COLS = 5,
  localparam int unsigned ND  = ROWS * COLS,
  localparam int unsigned DW  = (ND > 1) ? $clog2(ND) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  // configuration
  input  logic                     cfg_we,
  input  logic                     cfg_static,
  input  logic [DW-1:0]            cfg_dom,
  input  logic [PC_W-1:0]          cfg_addr,
  input  instr_t                   cfg_instr,
  input  static_cfg_t              cfg_scfg,
  // stream ports, one pair per domain
  input  logic [ND-1:0]            sin_valid,
  input  logic [ND-1:0][W-1:0]     sin_data,
  output logic [ND-1:0]            sin_ready,
  output logic [ND-1:0]            sin_underflow,
  output logic [ND-1:0]            sout_valid,
  output logic [ND-1:0][W-1:0]     sout_data,
  input  logic [ND-1:0]            sout_ready,
  output logic [ND-1:0]            sout_overflow,
  // observation
  output pcbus_t [ND-1:0]          pc_obs,
  output logic [ND-1:0][MODE_W-1:0] mode_obs,
  output logic [ND-1:0]            mode_switch
);
  word_t  [ND-1:0][NDIR-1:0][TRACKS-1:0] wout, win;
  logic   [ND-1:0][NDIR-1:0][TRACKS-1:0] bout, bin;
  pcbus_t [ND-1:0][NDIR-1:0]             pcin;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned I = r * COLS + c;

      // From the north neighbour: its southward outputs.
      if (r > 0) begin : g_n
        assign win[I][DIR_N]  = wout[I - COLS][DIR_S];
        assign bin[I][DIR_N]  = bout[I - COLS][DIR_S];
        assign pcin[I][DIR_N] = pc_obs[I - COLS];
      end else begin : g_n0
        assign win[I][DIR_N]  = '0;
        assign bin[I][DIR_N]  = '0;
        assign pcin[I][DIR_N] = '0;
      end
      if (r < ROWS - 1) begin : g_s
        assign win[I][DIR_S]  = wout[I + COLS][DIR_N];
        assign bin[I][DIR_S]  = bout[I + COLS][DIR_N];
        assign pcin[I][DIR_S] = pc_obs[I + COLS];
      end else begin : g_s0
        assign win[I][DIR_S]  = '0;
        assign bin[I][DIR_S]  = '0;
        assign pcin[I][DIR_S] = '0;
      end
      if (c > 0) begin : g_w
        assign win[I][DIR_W]  = wout[I - 1][DIR_E];
        assign bin[I][DIR_W]  = bout[I - 1][DIR_E];
        assign pcin[I][DIR_W] = pc_obs[I - 1];
      end else begin : g_w0
        assign win[I][DIR_W]  = '0;
        assign bin[I][DIR_W]  = '0;
        assign pcin[I][DIR_W] = '0;
      end
      if (c < COLS - 1) begin : g_e
        assign win[I][DIR_E]  = wout[I + 1][DIR_W];
        assign bin[I][DIR_E]  = bout[I + 1][DIR_W];
        assign pcin[I][DIR_E] = pc_obs[I + 1];
      end else begin : g_e0
        assign win[I][DIR_E]  = '0;
        assign bin[I][DIR_E]  = '0;
        assign pcin[I][DIR_E] = '0;
      end

      ops_domain u_dom (
        .clk, .rst_n,
        .cfg_we(cfg_we && (cfg_dom == DW'(I))), .cfg_static, .cfg_addr, .cfg_instr, .cfg_scfg,
        .run, .pc_in(pcin[I]), .pc_out(pc_obs[I]), .mode(mode_obs[I]),
        .mode_switch(mode_switch[I]),
        .win(win[I]), .wout(wout[I]), .bin(bin[I]), .bout(bout[I]),
        .sin_valid(sin_valid[I]), .sin_data(sin_data[I]), .sin_ready(sin_ready[I]),
        .sin_underflow(sin_underflow[I]),
        .sout_valid(sout_valid[I]), .sout_data(sout_data[I]), .sout_ready(sout_ready[I]),
        .sout_overflow(sout_overflow[I])
      );
    end
  end
endmodule
