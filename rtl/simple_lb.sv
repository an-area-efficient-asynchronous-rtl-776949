// simple_lb: the simple logic block, for handshake components of the data path.
//
// Holds only a BinaryFunction module, a Variable module and a C-element, between
// an input switch box and an output switch box; the C-element joins the
// Variable's two write acknowledges (var_ready0, var_ready1) into one
// FalseVariable acknowledge. Terminals and configuration are those of the
// complex LB (hc_pkg lb_cfg_t); only the first SLB_MIN module inputs (MI_LUT to
// MI_RD1) and the first SLB_MOUT module outputs (MO_VOUT0 to MO_SFVA) exist, so
// higher switch-box selections and the Sequence, CallMUX, Case and Encode
// configuration fields are ignored. The set of modules follows the
// architecture; indices and crossbars are this implementation's choices.
module simple_lb
  import hc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  lb_cfg_t             cfg,
  input  logic [LB_IN_W-1:0]  term_in,
  output logic [LB_OUT_W-1:0] term_out
);
  localparam int unsigned SSW = $clog2(SLB_MOUT + 1);

  logic [SLB_MIN-1:0]  mi;
  logic [SLB_MOUT-1:0] mo;
  logic [SLB_MIN-1:0][ISB_SW-1:0] isb_sel;
  logic [LB_OUT_W-1:0][SSW-1:0]   osb_sel;

  always_comb begin
    for (int k = 0; k < SLB_MIN; k++) isb_sel[k] = cfg.isb_sel[k];
    for (int k = 0; k < LB_OUT_W; k++)
      osb_sel[k] = (32'(cfg.osb_sel[k]) <= SLB_MOUT) ? SSW'(cfg.osb_sel[k]) : '0;
  end

  lb_switch_box #(.N_IN(LB_IN_W), .N_OUT(SLB_MIN), .SW(ISB_SW)) u_isb (
    .sel(isb_sel), .in(term_in), .out(mi)
  );

  dr_t  [LUT_K-1:0] lut_in;
  dr_t  lut_out, var_out0, var_out1;
  logic data_valid, data_spacer, lut_ready, var_ready0, var_ready1, fv_ack;

  assign lut_in = mi[MI_LUT +: 2*LUT_K];

  binary_function #(.K(LUT_K)) u_bf (
    .clk, .rst_n, .lut(cfg.lut), .lut_in, .lut_ready,
    .lut_out, .data_valid, .data_spacer
  );

  variable_module u_var (
    .clk, .rst_n, .rd0_src(cfg.rd0_src), .rd1_src(cfg.rd1_src),
    .lut_out, .data_valid, .data_spacer, .lut_ready,
    .var_in(mi[MI_VARIN +: 2]),
    .rd_req0(mi[MI_RD0]), .rd_req1(mi[MI_RD1]),
    .var_out0, .var_out1, .var_ready0, .var_ready1
  );

  c_element #(.N(2)) u_c (
    .clk, .rst_n, .in({var_ready1, var_ready0}), .out(fv_ack)
  );

  always_comb begin
    mo = '0;
    mo[MO_VOUT0 +: 2] = var_out0;
    mo[MO_VOUT1 +: 2] = var_out1;
    mo[MO_VRDY0]      = var_ready0;
    mo[MO_VRDY1]      = var_ready1;
    mo[MO_SFVA]       = fv_ack;
  end

  lb_switch_box #(.N_IN(SLB_MOUT), .N_OUT(LB_OUT_W), .SW(SSW)) u_osb (
    .sel(osb_sel), .in(mo), .out(term_out)
  );
endmodule
