// connection_block: Connection Block (CB), joins logic-block terminals to a routing segment.
//
// A segment carries NT single wires (NH in each direction). seg_raw is each
// wire as driven by the switch block at its upstream end; seg_out is the wire
// as it leaves the CB towards the downstream switch block. For each wire,
// seg_sel = 0 passes it through and seg_sel = j puts logic-block output wire
// drv[j-1] on it instead. Each of the 2*TW wires of the two input terminals the
// CB serves (term_in, first terminal in the low TW bits) takes segment wire
// seg_out[j-1] for term_sel = j, or is tied low for 0. The cell uses one CB
// above its LB (driven by N1, N2 and the S terminal of the LB above; feeding N1
// and that S input) and one to its right (driven by E1, E2; feeding E1 and the
// W input of the LB to the right), as the architecture places them.
//
// Timing: the value leaving the CB on each segment wire is registered, so a
// segment delays its wires by one clock. This models wire delay, which the
// delay-insensitive handshakes tolerate. Because every routing path between
// switch blocks and logic blocks crosses a CB, it also keeps the fabric free of
// combinational loops. A change on seg_raw, drv or cfg appears on seg_out and
// term_in after the next rising clk edge. The multiplexer structure and the
// registered segment are this implementation's choice; the architecture does
// not describe either.
module connection_block
  import hc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  cb_cfg_t               cfg,
  input  logic [NT-1:0]         seg_raw,
  input  logic [CB_DRV_W-1:0]   drv,
  output logic [NT-1:0]         seg_out,
  output logic [2*TW-1:0]       term_in
);
  logic [NT-1:0] seg_next;

  always_comb begin
    for (int k = 0; k < NT; k++) begin
      seg_next[k] = seg_raw[k];
      for (int j = 0; j < CB_DRV_W; j++)
        if (32'(cfg.seg_sel[k]) == j + 1) seg_next[k] = drv[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seg_out <= '0;
    else        seg_out <= seg_next;
  end

  always_comb begin
    for (int k = 0; k < 2*TW; k++) begin
      term_in[k] = 1'b0;
      for (int j = 0; j < NT; j++)
        if (32'(cfg.term_sel[k]) == j + 1) term_in[k] = seg_out[j];
    end
  end
endmodule
