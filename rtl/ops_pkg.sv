// ops_pkg: shared types and constants of the branching (pipelined program
// counter) CGRA.
//
// Every domain of the array has the same fixed composition: two 32-bit ALUs,
// two 4-input LUTs, a 4 KB memory, an 8-entry register file, a program
// counter, one input and one output stream port. These numbers, the 8-bit
// program counter (256 instructions per domain), the 32-bit word interconnect
// with a valid bit, the separate 1-bit interconnect and the 0..3 cycle
// retiming chains come from the architecture description. The number of
// tracks per direction, the crossbar source/sink lists, the ALU operation set,
// the instruction layout and the mode table size are this design's own choices.
//
// Because the instruction and static-configuration structs are shared by all
// domains, the per-domain composition is fixed here as package constants;
// the array size is a parameter of the top module.
package ops_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned W          = 32;  // word width
  localparam int unsigned PC_W       = 8;   // program counter width
  localparam int unsigned NINSTR     = 1 << PC_W;  // 256 instructions
  localparam int unsigned TRACKS     = 5;   // tracks per direction
  localparam int unsigned NDIR       = 4;   // N, E, S, W
  localparam int unsigned NMODES     = 8;   // mode table entries
  localparam int unsigned MODE_W     = $clog2(NMODES);
  localparam int unsigned MAX_PC_DLY = 8;   // max offset step between neighbours
  localparam int unsigned PCDLY_W    = $clog2(MAX_PC_DLY + 1);
  localparam int unsigned RT_MAX     = 3;   // retiming chain: 0..3 cycles
  localparam int unsigned RF_DEPTH   = 8;
  localparam int unsigned RF_AW      = $clog2(RF_DEPTH);
  localparam int unsigned MEM_BYTES  = 4096;
  localparam int unsigned MEM_WORDS  = MEM_BYTES / (W / 8);  // 1024
  localparam int unsigned MEM_AW     = $clog2(MEM_WORDS);
  localparam int unsigned NEXIT      = 2;   // crossbar -> switch box ports per width
  localparam int unsigned NIN        = NDIR * TRACKS;  // incoming tracks per width

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // A routed word: 32 data bits plus the valid bit carried on every word track.
  typedef struct packed {
    logic         valid;
    logic [W-1:0] data;
  } word_t;

  // Program counter as passed between neighbouring domains.
  typedef struct packed {
    logic            valid;
    logic [PC_W-1:0] pc;
  } pcbus_t;

  // ---------------------------------------------------------------- ALU
  typedef enum logic [3:0] {
    ALU_NOP  = 4'd0,   // output invalid
    ALU_PASS = 4'd1,   // a
    ALU_ADD  = 4'd2,
    ALU_SUB  = 4'd3,
    ALU_MUL  = 4'd4,   // two-cycle latency
    ALU_AND  = 4'd5,
    ALU_OR   = 4'd6,
    ALU_XOR  = 4'd7,
    ALU_SHL  = 4'd8,   // a << b[4:0]
    ALU_SHR  = 4'd9,   // logical
    ALU_SRA  = 4'd10,  // arithmetic
    ALU_EQ   = 4'd11,  // result and flag 1 if a == b
    ALU_LT   = 4'd12,  // signed a < b
    ALU_LTU  = 4'd13,  // unsigned a < b
    ALU_SEL  = 4'd14,  // ctrl ? a : b
    ALU_MAX  = 4'd15   // signed maximum
  } alu_op_e;

  // ---------------------------------------------------------------- word crossbar
  // Sources (selected by a sink's select field).
  localparam int unsigned WS_NONE  = 0;  // invalid zero word
  localparam int unsigned WS_CONST = 1;  // instruction constant, valid
  localparam int unsigned WS_ALU0  = 2;
  localparam int unsigned WS_ALU1  = 3;
  localparam int unsigned WS_MEM   = 4;
  localparam int unsigned WS_RF    = 5;
  localparam int unsigned WS_SIN   = 6;
  localparam int unsigned WS_IN0   = 7;  // + dir*TRACKS + track
  localparam int unsigned NWSRC    = WS_IN0 + NIN;
  localparam int unsigned WSEL_W   = $clog2(NWSRC);
  // Sinks.
  localparam int unsigned WK_ALU0A = 0;
  localparam int unsigned WK_ALU0B = 1;
  localparam int unsigned WK_ALU1A = 2;
  localparam int unsigned WK_ALU1B = 3;
  localparam int unsigned WK_MADDR = 4;
  localparam int unsigned WK_MDATA = 5;
  localparam int unsigned WK_RFW   = 6;
  localparam int unsigned WK_SOUT  = 7;
  localparam int unsigned WK_EXIT0 = 8;  // + exit index
  localparam int unsigned NWSNK    = WK_EXIT0 + NEXIT;

  // ---------------------------------------------------------------- bit crossbar
  localparam int unsigned BS_ZERO  = 0;
  localparam int unsigned BS_ONE   = 1;
  localparam int unsigned BS_ALU0F = 2;
  localparam int unsigned BS_ALU1F = 3;
  localparam int unsigned BS_LUT0  = 4;
  localparam int unsigned BS_LUT1  = 5;
  localparam int unsigned BS_IN0   = 6;  // + dir*TRACKS + track
  localparam int unsigned NBSRC    = BS_IN0 + NIN;
  localparam int unsigned BSEL_W   = $clog2(NBSRC);
  localparam int unsigned BK_ALU0C = 0;
  localparam int unsigned BK_ALU1C = 1;
  localparam int unsigned BK_LUT0  = 2;  // 4 inputs: 2..5
  localparam int unsigned BK_LUT1  = 6;  // 4 inputs: 6..9
  localparam int unsigned BK_MWE   = 10;
  localparam int unsigned BK_PCBR  = 11;
  localparam int unsigned BK_EXIT0 = 12;  // + exit index
  localparam int unsigned NBSNK    = BK_EXIT0 + NEXIT;

  // ---------------------------------------------------------------- switch box
  // Each outgoing track selects: 0 = nothing, 1..NIN = incoming track
  // (dir*TRACKS + track, after its retiming chain), NIN+1.. = crossbar exit.
  localparam int unsigned NSBSRC   = 1 + NIN + NEXIT;
  localparam int unsigned SBSEL_W  = $clog2(NSBSRC);
  localparam int unsigned NOUT     = NDIR * TRACKS;

  // ---------------------------------------------------------------- instruction
  // One per-cycle configuration of a domain, addressed by its program counter.
  // The all-zero instruction is a no-operation.
  typedef struct packed {
    logic [NWSNK-1:0][WSEL_W-1:0]  wsel;     // word crossbar selects
    logic [NBSNK-1:0][BSEL_W-1:0]  bsel;     // bit crossbar selects
    logic [NOUT-1:0][SBSEL_W-1:0]  sbw;      // switch box, word tracks
    logic [NOUT-1:0][SBSEL_W-1:0]  sbb;      // switch box, bit tracks
    alu_op_e [1:0]                 alu_op;
    logic [1:0][15:0]              lut_tt;   // LUT truth tables
    logic [RF_AW-1:0]              rf_raddr;
    logic [RF_AW-1:0]              rf_waddr;
    logic                          sin_pop;  // consume the input stream word
    logic [W-1:0]                  imm;      // constant source
  } instr_t;

  // ---------------------------------------------------------------- static configuration
  typedef enum logic [1:0] {
    PC_IDLE     = 2'd0,  // domain unused
    PC_LEADER   = 2'd1,  // owns the mode sequence (offset 0)
    PC_FOLLOWER = 2'd2,  // delayed copy of a neighbour's program counter
    PC_MODULO   = 2'd3   // plain modulo counter over one mode
  } pc_role_e;

  typedef struct packed {
    logic [PC_W-1:0]   base;     // first instruction of the mode
    logic [PC_W-1:0]   last;     // base + II - 1
    logic [MODE_W-1:0] next_nt;  // next mode when the branch bit is 0
    logic [MODE_W-1:0] next_t;   // next mode when the branch bit is 1
  } mode_t;

  typedef struct packed {
    pc_role_e                      role;
    dir_e                          pc_src;    // follower: neighbour to follow
    logic [PCDLY_W-1:0]            pc_delay;  // follower: own offset - neighbour's offset
    logic [MODE_W-1:0]             start_mode;
    mode_t [NMODES-1:0]            modes;
    logic [NIN-1:0][1:0]           rt_w;      // retiming delay per incoming word track
    logic [NIN-1:0][1:0]           rt_b;      // retiming delay per incoming bit track
  } static_cfg_t;

endpackage
