// hc_tb_pkg: helpers the testbenches use to write fabric configurations.
// Terminal numbering: inputs 0=N1 1=W 2=S 3=E1; outputs 0=N1 1=N2 2=S 3=E1 4=E2.
// A dual-rail bit on terminal wires (w, w+1) has F on w and T on w+1.
package hc_tb_pkg;
  import hc_pkg::*;

  localparam int IN_N1 = 0, IN_W = 1, IN_S = 2, IN_E1 = 3;
  localparam int OUT_N1 = 0, OUT_N2 = 1, OUT_S = 2, OUT_E1 = 3, OUT_E2 = 4;

  // input switch box selection for input terminal wire
  function automatic logic [ISB_SW-1:0] isb(int term, int w);
    return ISB_SW'(term * TW + w + 1);
  endfunction

  // output switch box selection for module output w
  function automatic logic [OSB_SW-1:0] osb(int mo);
    return OSB_SW'(mo + 1);
  endfunction

  // bit index of an output terminal wire in term_out
  function automatic int tout(int term, int w);
    return term * TW + w;
  endfunction

  // bit index of an input terminal wire in term_in
  function automatic int tin(int term, int w);
    return term * TW + w;
  endfunction

  // route module input mi (2 wires if dual-rail) from terminal wires
  function automatic void route_in(ref lb_cfg_t c, input int mi, input int term, input int w, input int n);
    for (int i = 0; i < n; i++) c.isb_sel[mi + i] = isb(term, w + i);
  endfunction

  // route module output mo (n wires) to terminal wires
  function automatic void route_out(ref lb_cfg_t c, input int mo, input int term, input int w, input int n);
    for (int i = 0; i < n; i++) c.osb_sel[term * TW + w + i] = osb(mo + i);
  endfunction
  // switch block selection: outgoing wire on side out_side from incoming wire w of in_side
  function automatic logic [SB_SW-1:0] sb_sel(int out_side, int in_side, int w);
    int o;
    o = (in_side - out_side - 1 + 8) % 4;
    return SB_SW'(o * NH + w + 1);
  endfunction
endpackage
