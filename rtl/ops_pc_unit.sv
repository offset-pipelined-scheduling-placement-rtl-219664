// ops_pc_unit: program counter of one domain.
//
// This is the mechanism that lets the array branch. Every domain issues the
// instruction addressed by its own 8-bit program counter, but only the lead
// domain decides the execution sequence; every other domain copies the
// program counter of a neighbour, delayed, so it runs the same sequence of
// modes a fixed number of cycles (its offset) behind the leader.
//
// Roles (static configuration):
//  * PC_LEADER: a mode occupies instructions base..last (last = base+II-1).
//    The counter steps through them; at `last` it starts a new iteration at
//    the base of next_t (branch bit set) or next_nt (clear), which may be the
//    same mode. Issuing starts in start_mode when `run` is high and stops
//    (valid drops) when `run` goes low.
//  * PC_FOLLOWER: pc_out is pc_in[pc_src] delayed by pc_delay cycles
//    (1..MAX_PC_DLY; 0 is treated as 1), i.e. the domain's offset is its
//    source neighbour's offset plus pc_delay. After the leader stops, the
//    followers finish the iterations already started (the epilogue).
//  * PC_MODULO: a plain modulo counter over start_mode's instructions,
//    ignoring the branch bit, for modulo-scheduled mappings.
//  * PC_IDLE: never valid.
// Outputs are registered. `mode` and `mode_switch` report the leader's (or
// modulo counter's) current mode and a change of mode at an iteration
// boundary; followers report mode 0.
//
// The leader/follower scheme, offsets, II-long iterations and the modulo
// option follow the architecture description. The mode table with two
// successors per mode selected by one branch bit is this design's encoding
// of the mode transition graph.
module ops_pc_unit
  import ops_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  static_cfg_t          cfg,
  input  logic                 run,
  input  logic                 br,
  input  pcbus_t [NDIR-1:0]    pc_in,
  output pcbus_t               pc_out,
  output logic [MODE_W-1:0]    mode,
  output logic                 mode_switch
);
  pcbus_t            own_q;
  logic [MODE_W-1:0] mode_q;
  pcbus_t            dly_q [MAX_PC_DLY];
  logic              at_last;
  logic [MODE_W-1:0] next_mode;

  assign at_last   = own_q.valid && (own_q.pc == cfg.modes[mode_q].last);
  always_comb begin
    if (cfg.role == PC_MODULO) next_mode = mode_q;
    else                       next_mode = br ? cfg.modes[mode_q].next_t
                                              : cfg.modes[mode_q].next_nt;
  end

  // Leader / modulo counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q  <= '0;
      mode_q <= '0;
    end else if (!(cfg.role inside {PC_LEADER, PC_MODULO}) || !run) begin
      own_q.valid <= 1'b0;
      mode_q      <= cfg.start_mode;
    end else if (!own_q.valid) begin
      own_q  <= '{valid: 1'b1, pc: cfg.modes[cfg.start_mode].base};
      mode_q <= cfg.start_mode;
    end else if (at_last) begin
      own_q.pc <= cfg.modes[next_mode].base;
      mode_q   <= next_mode;
    end else begin
      own_q.pc <= own_q.pc + 1'b1;
    end
  end

  // Follower delay line: dly_q[i] is the source neighbour's PC i+1 cycles ago.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_PC_DLY; i++) dly_q[i] <= '0;
    end else begin
      dly_q[0] <= pc_in[cfg.pc_src];
      for (int i = 1; i < MAX_PC_DLY; i++) dly_q[i] <= dly_q[i-1];
    end
  end

  always_comb begin
    unique case (cfg.role)
      PC_LEADER, PC_MODULO: pc_out = own_q;
      PC_FOLLOWER: begin
        if (cfg.pc_delay == 0)               pc_out = dly_q[0];
        else if (int'(cfg.pc_delay) > int'(MAX_PC_DLY)) pc_out = dly_q[MAX_PC_DLY-1];
        else                                 pc_out = dly_q[cfg.pc_delay - 1];
      end
      default: pc_out = '0;
    endcase
  end

  assign mode        = (cfg.role inside {PC_LEADER, PC_MODULO}) ? mode_q : '0;
  assign mode_switch = (cfg.role == PC_LEADER) && run && at_last && (next_mode != mode_q);
endmodule
