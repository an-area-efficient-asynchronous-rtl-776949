// hcfpga_cell: one cell of the mesh: a logic block, two connection blocks, a switch block.
//
// The LB is a complex LB (COMPLEX = 1) or a simple LB. The upper CB sits on the
// horizontal segment above the LB and serves its N1/N2 terminals and the S
// terminal of the LB above; the right CB sits on the vertical segment to the
// right and serves E1/E2 and the W input of the LB to the right. The switch
// block is at the cell's top-right corner; its west side is the segment of the
// upper CB and its south side the segment of the right CB. Segment halves:
// "fwd" wires run east/south, "bwd" wires run west/north.
// Ports, by neighbour:
//   h_from_w / h_to_w   horizontal segment, to and from the west neighbour's SB
//   sb_e_out / sb_e_in  this SB's east side, the east neighbour's segment
//   sb_n_in  / sb_n_out this SB's north side, the north neighbour's vertical segment
//   v_to_s   / v_from_s this cell's vertical segment, to and from the SB below
//   up_s_out / up_s_in  S terminal of the LB above (its outputs, its inputs)
//   lb_s_out / lb_s_in  this LB's S terminal (served by the CB of the cell below)
//   lb_w_in  / rt_w_in  this LB's W input; the W input of the LB to the right
// Configuration: the cell's cell_cfg_t is held in a register written when
// cfg_we is high (a plain write port; loading is not part of the architecture
// as described, so this port is this implementation's choice). The cell
// arrangement follows the architecture's figure; all sizes are hc_pkg's.
// Timing: the switch block and the LB's switch boxes are combinational. Each
// CB registers the segment wires it sends on, so a segment delays its wires by
// one clock. Every routing path between switch blocks and LBs crosses a CB,
// so no configuration can close a combinational loop. The registered segment
// is this implementation's choice.
module hcfpga_cell
  import hc_pkg::*;
#(
  parameter bit COMPLEX = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  cell_cfg_t     cfg_wdata,
  input  logic [NH-1:0] h_from_w,
  output logic [NH-1:0] h_to_w,
  output logic [NH-1:0] sb_e_out,
  input  logic [NH-1:0] sb_e_in,
  input  logic [NH-1:0] sb_n_in,
  output logic [NH-1:0] sb_n_out,
  output logic [NH-1:0] v_to_s,
  input  logic [NH-1:0] v_from_s,
  input  logic [TW-1:0] up_s_out,
  output logic [TW-1:0] up_s_in,
  output logic [TW-1:0] lb_s_out,
  input  logic [TW-1:0] lb_s_in,
  input  logic [TW-1:0] lb_w_in,
  output logic [TW-1:0] rt_w_in
);
  cell_cfg_t cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg <= '0;
    else if (cfg_we) cfg <= cfg_wdata;
  end

  // LB terminals
  logic [TW-1:0] n1_in, e1_in;
  logic [LB_IN_W-1:0]  term_in;
  logic [LB_OUT_W-1:0] term_out;
  logic [TW-1:0] n1_out, n2_out, e1_out, e2_out;

  assign term_in = {e1_in, lb_s_in, lb_w_in, n1_in};
  assign {e2_out, e1_out, lb_s_out, n2_out, n1_out} = term_out;

  if (COMPLEX) begin : g_lb
    complex_lb u_lb (.clk, .rst_n, .cfg(cfg.lb), .term_in, .term_out);
  end else begin : g_lb
    simple_lb  u_lb (.clk, .rst_n, .cfg(cfg.lb), .term_in, .term_out);
  end

  // Switch block
  logic [3:0][NH-1:0] sb_in, sb_out;

  switch_block u_sb (.cfg(cfg.sb), .in(sb_in), .out(sb_out));

  // Upper CB: horizontal segment, fwd = eastward (from west SB), bwd = westward (from own SB)
  logic [NT-1:0] up_seg_out;

  connection_block u_cb_up (
    .clk, .rst_n,
    .cfg(cfg.cb_up),
    .seg_raw({sb_out[SIDE_W], h_from_w}),
    .drv({up_s_out, n2_out, n1_out}),
    .seg_out(up_seg_out),
    .term_in({up_s_in, n1_in})
  );

  // Right CB: vertical segment, fwd = southward (from own SB), bwd = northward (from SB below)
  logic [NT-1:0] rt_seg_out;

  connection_block u_cb_rt (
    .clk, .rst_n,
    .cfg(cfg.cb_rt),
    .seg_raw({v_from_s, sb_out[SIDE_S]}),
    .drv({{TW{1'b0}}, e2_out, e1_out}),
    .seg_out(rt_seg_out),
    .term_in({rt_w_in, e1_in})
  );

  assign sb_in[SIDE_W] = up_seg_out[NH-1:0];
  assign h_to_w        = up_seg_out[NT-1:NH];
  assign v_to_s        = rt_seg_out[NH-1:0];
  assign sb_in[SIDE_S] = rt_seg_out[NT-1:NH];
  assign sb_in[SIDE_N] = sb_n_in;
  assign sb_n_out      = sb_out[SIDE_N];
  assign sb_in[SIDE_E] = sb_e_in;
  assign sb_e_out      = sb_out[SIDE_E];
endmodule
