// tb_ops_domain: one domain running a two-mode program as lead domain.
//
// Mode 0 (instructions 0..3) and mode 1 (4..7) both have II = 4. Each
// iteration pops x from the input stream, computes y = 3*x + c (c = 5 in
// mode 0, 7 in mode 1) with a multiply (two-cycle latency) and an add, and
// derives the branch bit (x & 3) != 0 through ALU1's flag and LUT0. The next
// iteration runs mode 1 when the bit is set, mode 0 otherwise. y leaves
// through a crossbar exit, the east switch box track, an external loopback
// into the east input, a 2-cycle retiming chain and finally the output
// stream port (the last y leaves during the following iteration). The testbench checks every output value, the output rate of
// one word per II cycles, the mode sequence, and counts mode switches.
module tb_ops_domain;
  import ops_pkg::*;
  import ops_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_static;
  logic [PC_W-1:0] cfg_addr;
  instr_t cfg_instr;
  static_cfg_t cfg_scfg;
  logic run;
  pcbus_t [NDIR-1:0] pc_in;
  pcbus_t pc_out;
  logic [MODE_W-1:0] mode;
  logic mode_switch;
  word_t [NDIR-1:0][TRACKS-1:0] win, wout;
  logic  [NDIR-1:0][TRACKS-1:0] bin, bout;
  logic sin_valid, sin_ready, sin_underflow, sout_valid, sout_ready, sout_overflow;
  logic [W-1:0] sin_data, sout_data;
  int checks = 0, failures = 0;

  ops_domain dut (.*);
  always #5 clk = ~clk;

  // external loopback of the east tracks
  always_comb begin
    win = '0; bin = '0;
    win[DIR_E] = wout[DIR_E];
    bin[DIR_E] = bout[DIR_E];
  end
  assign pc_in = '0;

  task automatic load_instr(int a, instr_t x);
    @(negedge clk);
    cfg_we = 1; cfg_static = 0; cfg_addr = PC_W'(a); cfg_instr = x;
    @(negedge clk);
    cfg_we = 0;
  endtask

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

  localparam int NX = 200;
  logic [31:0] xs [NX];
  logic [31:0] ys [NX];
  int n_in = 0, n_out = 0, last_out_cyc = -1, cyc = 0, switches = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // producer
  assign sin_valid = run && (n_in < NX);
  assign sin_data  = (n_in < NX) ? xs[n_in] : '0;
  always @(posedge clk) if (sin_valid && sin_ready) n_in <= n_in + 1;

  // consumer / checker
  always @(posedge clk) if (rst_n) begin
    if (sout_valid) begin
      chk("output value", n_out < NX && sout_data == ys[n_out]);
      if (last_out_cyc >= 0) chk("one output per II=4 cycles", cyc - last_out_cyc == 4);
      last_out_cyc <= cyc;
      n_out <= n_out + 1;
    end
    if (mode_switch) switches <= switches + 1;
  end

  initial begin
    instr_t x;
    int m;
    cfg_we = 0; cfg_static = 0; cfg_addr = 0; cfg_instr = '0; cfg_scfg = '0;
    run = 0; sout_ready = 1;
    // reference
    m = 0;
    for (int i = 0; i < NX; i++) begin
      xs[i] = $urandom_range(100000);
      ys[i] = 3 * xs[i] + ((m == 1) ? 7 : 5);
      m = ((xs[i] & 3) != 0) ? 1 : 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int md = 0; md < 2; md++) begin
      // slot 0: pop x; x,3 -> ALU0; x,3 -> ALU1; previous y: exit0 -> east track 0
      x = '0;
      x.sin_pop = 1; x.imm = 3;
      x.wsel[WK_ALU0A] = WS_SIN;  x.wsel[WK_ALU0B] = WS_CONST;
      x.wsel[WK_ALU1A] = WS_SIN;  x.wsel[WK_ALU1B] = WS_CONST;
      x.sbw[sb_out(DIR_E, 0)] = sb_exit(0);
      load_instr(4*md + 0, x);
      // slot 1: ALU0 = x*3 (2 cycles), ALU1 = x & 3 -> flag -> LUT0 input 0
      x = '0;
      x.alu_op[0] = ALU_MUL; x.alu_op[1] = ALU_AND;
      x.bsel[BK_LUT0] = BS_ALU1F;
      load_instr(4*md + 1, x);
      // slot 2: LUT0 passes the flag to the branch input; product, c -> ALU1
      x = '0;
      x.lut_tt[0] = 16'hAAAA;
      x.bsel[BK_PCBR] = BS_LUT0;
      x.wsel[WK_ALU1A] = WS_ALU0; x.wsel[WK_ALU1B] = WS_CONST;
      x.imm = (md == 1) ? 7 : 5;
      load_instr(4*md + 2, x);
      // slot 3: ALU1 adds; y -> exit0; looped-back previous y -> output port
      x = '0;
      x.alu_op[1] = ALU_ADD;
      x.wsel[WK_EXIT0] = WS_ALU1;
      x.wsel[WK_SOUT] = ws_in(DIR_E, 0);
      load_instr(4*md + 3, x);
    end
    cfg_scfg = '0;
    cfg_scfg.role = PC_LEADER;
    cfg_scfg.start_mode = 0;
    cfg_scfg.modes[0] = '{base: 0, last: 3, next_nt: 0, next_t: 1};
    cfg_scfg.modes[1] = '{base: 4, last: 7, next_nt: 0, next_t: 1};
    cfg_scfg.rt_w[in_idx(DIR_E, 0)] = 2;
    @(negedge clk); cfg_we = 1; cfg_static = 1;
    @(negedge clk); cfg_we = 0; cfg_static = 0;
    repeat (3) @(negedge clk);
    run = 1;
    wait (n_out == NX);
    repeat (20) @(negedge clk);
    run = 0;
    repeat (20) @(negedge clk);
    chk("every output seen", n_out == NX);
    chk("no overflow", !sout_overflow);
    chk("both modes and switches occurred", switches > 10);
    $display("outputs=%0d mode_switches=%0d", n_out, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
