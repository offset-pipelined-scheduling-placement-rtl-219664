// ops_tb_pkg: helpers shared by the domain and array testbenches for
// writing instructions by hand (crossbar source codes for incoming tracks,
// switch box codes).
package ops_tb_pkg;
  import ops_pkg::*;

  // Word crossbar source code of incoming word track (dir, track).
  function automatic logic [WSEL_W-1:0] ws_in(dir_e d, int t);
    return WSEL_W'(WS_IN0 + int'(d) * TRACKS + t);
  endfunction
  // Bit crossbar source code of incoming bit track (dir, track).
  function automatic logic [BSEL_W-1:0] bs_in(dir_e d, int t);
    return BSEL_W'(BS_IN0 + int'(d) * TRACKS + t);
  endfunction
  // Switch box output index of outgoing track (dir, track).
  function automatic int sb_out(dir_e d, int t);
    return int'(d) * TRACKS + t;
  endfunction
  // Switch box source code: incoming track (dir, track).
  function automatic logic [SBSEL_W-1:0] sb_in(dir_e d, int t);
    return SBSEL_W'(1 + int'(d) * TRACKS + t);
  endfunction
  // Switch box source code: crossbar exit port e.
  function automatic logic [SBSEL_W-1:0] sb_exit(int e);
    return SBSEL_W'(1 + NIN + e);
  endfunction
  // Index of incoming track (dir, track) in the retiming configuration.
  function automatic int in_idx(dir_e d, int t);
    return int'(d) * TRACKS + t;
  endfunction
endpackage
