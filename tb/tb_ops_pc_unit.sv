// tb_ops_pc_unit: program counter roles.
// A leader runs the three-mode transition graph A -> B, B -> B or C, C -> A
// with initiation intervals 2, 2 and 3 under random branch bits and is
// compared cycle by cycle with a reference sequencer. A follower linked to
// the leader with offset step 3 must show the leader's counter exactly three
// cycles late, including the drain after run falls. A modulo-role counter
// must cycle over one mode. Mode switches are counted.
module tb_ops_pc_unit;
  import ops_pkg::*;
  logic clk = 0, rst_n = 0, run, br;
  static_cfg_t cfg_l, cfg_f, cfg_m;
  pcbus_t [NDIR-1:0] pcin_l, pcin_f;
  pcbus_t pc_l, pc_f, pc_m;
  logic [MODE_W-1:0] mode_l, mode_f, mode_m;
  logic sw_l, sw_f, sw_m;
  int checks = 0, failures = 0, switches = 0;
  pcbus_t hist [8];

  ops_pc_unit u_lead (.clk, .rst_n, .cfg(cfg_l), .run, .br, .pc_in(pcin_l), .pc_out(pc_l), .mode(mode_l), .mode_switch(sw_l));
  ops_pc_unit u_fol  (.clk, .rst_n, .cfg(cfg_f), .run, .br(1'b0), .pc_in(pcin_f), .pc_out(pc_f), .mode(mode_f), .mode_switch(sw_f));
  ops_pc_unit u_mod  (.clk, .rst_n, .cfg(cfg_m), .run, .br(1'b1), .pc_in(pcin_l), .pc_out(pc_m), .mode(mode_m), .mode_switch(sw_m));
  always #5 clk = ~clk;

  assign pcin_l = '0;
  always_comb begin
    pcin_f = '0;
    pcin_f[DIR_W] = pc_l;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference leader
  logic ref_v; logic [7:0] ref_pc; int ref_mode;
  int base [3] = '{0, 2, 4};
  int last [3] = '{1, 3, 6};

  initial begin
    cfg_l = '0; cfg_f = '0; cfg_m = '0;
    cfg_l.role = PC_LEADER; cfg_l.start_mode = 0;
    cfg_l.modes[0] = '{base: 0, last: 1, next_nt: 1, next_t: 1};
    cfg_l.modes[1] = '{base: 2, last: 3, next_nt: 1, next_t: 2};
    cfg_l.modes[2] = '{base: 4, last: 6, next_nt: 0, next_t: 0};
    cfg_f.role = PC_FOLLOWER; cfg_f.pc_src = DIR_W; cfg_f.pc_delay = 3;
    cfg_m = cfg_l; cfg_m.role = PC_MODULO; cfg_m.start_mode = 2;
    run = 0; br = 0;
    ref_v = 0; ref_pc = 0; ref_mode = 0;
    for (int i = 0; i < 8; i++) hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      run = !(cyc >= 1500 && cyc < 1520) && cyc > 2;
      br  = $urandom_range(1);
      #1;
      // compare current state
      chk("leader valid", pc_l.valid == ref_v);
      if (ref_v) begin
        chk("leader pc", pc_l.pc == ref_pc);
        chk("leader mode", int'(mode_l) == ref_mode);
      end
      chk("follower valid", pc_f.valid == hist[2].valid);
      if (hist[2].valid) chk("follower pc", pc_f.pc == hist[2].pc);
      if (pc_m.valid) chk("modulo range", pc_m.pc >= 4 && pc_m.pc <= 6);
      if (sw_l) switches++;
      // advance reference at the coming edge
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = pc_l;
      @(posedge clk);
      if (!run) begin ref_v = 0; ref_mode = 0; end
      else if (!ref_v) begin ref_v = 1; ref_mode = 0; ref_pc = 0; end
      else if (ref_pc == 8'(last[ref_mode])) begin
        int nm;
        case (ref_mode) 0: nm = 1; 1: nm = br ? 2 : 1; default: nm = 0; endcase
        ref_mode = nm; ref_pc = 8'(base[nm]);
      end else ref_pc++;
    end
    chk("mode switches happened", switches > 100);
    $display("mode switches: %0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // modulo counter must step 4,5,6,4,...
  pcbus_t m_prev;
  always @(posedge clk) begin
    if (rst_n && m_prev.valid && pc_m.valid) begin
      checks++;
      if (pc_m.pc != ((m_prev.pc == 6) ? 8'd4 : m_prev.pc + 8'd1)) begin failures++; $display("FAIL modulo step"); end
    end
    m_prev <= pc_m;
  end
  initial m_prev = '0;
endmodule
