// complex_lb: the complex logic block, for handshake components of controllers.
//
// Holds every module of the architecture: BinaryFunction, Variable, Sequence,
// CallMUX, Case and Encode, between an input switch box and an output switch
// box. The input switch box gives each of the CLB_MIN module input wires one of
// the 4*TW wires of the input terminals {E1, S, W, N1} (term_in, N1 in the low
// TW bits); the output switch box drives each of the 5*TW output terminal
// wires {E2, E1, S, N2, N1} (term_out, N1 lowest) from one of the CLB_MOUT
// module output wires. hc_pkg lists which module wire sits at which index
// (MI_* and MO_*). Module inputs and outputs carry four-phase dual-rail or
// request/acknowledge handshakes. The set of modules and the terminal names
// follow the architecture; the wire indices and the crossbar switch boxes are
// this implementation's choices. Combinational paths run from term_in to
// term_out through the CallMUX data, the Encode data and the Variable read
// ports; every handshake loop passes a register.
module complex_lb
  import hc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  lb_cfg_t             cfg,
  input  logic [LB_IN_W-1:0]  term_in,
  output logic [LB_OUT_W-1:0] term_out
);
  logic [CLB_MIN-1:0]  mi;
  logic [CLB_MOUT-1:0] mo;

  lb_switch_box #(.N_IN(LB_IN_W), .N_OUT(CLB_MIN), .SW(ISB_SW)) u_isb (
    .sel(cfg.isb_sel), .in(term_in), .out(mi)
  );

  // BinaryFunction + Variable
  dr_t  [LUT_K-1:0] lut_in;
  dr_t  lut_out, var_out0, var_out1;
  logic data_valid, data_spacer, lut_ready, var_ready0, var_ready1;

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

  // Sequence
  logic       act_ack, fv_ack;
  logic [1:0] seq_req;

  sequence_module u_seq (
    .clk, .rst_n, .mode(cfg.seq_mode), .fv_two(cfg.fv_two),
    .act_req(mi[MI_ACT]), .act_ack,
    .out_req(seq_req), .out_ack({mi[MI_SACK1], mi[MI_SACK0]}),
    .guard(mi[MI_GUARD +: 2]),
    .var_ready0, .var_ready1, .fv_ack
  );

  // CallMUX
  dr_t        call_out;
  logic [3:0] call_iack;

  callmux_module u_call (
    .clk, .rst_n, .call_in(mi[MI_CALL +: 8]), .in_ack(call_iack),
    .call_out, .out_ack(mi[MI_CACK])
  );

  // Case
  logic       case_iack;
  logic [3:0] case_req;

  case_module u_case (
    .clk, .rst_n, .one_bit(cfg.case_one_bit),
    .case_in(mi[MI_CASE +: 4]), .in_ack(case_iack),
    .out_req(case_req), .out_ack(mi[MI_KACK +: 4])
  );

  // Encode
  dr_t  [1:0] enc_out;
  logic [3:0] enc_iack;

  encode_module u_enc (
    .clk, .rst_n, .enc_req(mi[MI_ENC +: 4]), .in_ack(enc_iack),
    .enc_out, .out_ack(mi[MI_EACK])
  );

  always_comb begin
    mo                 = '0;
    mo[MO_VOUT0 +: 2]  = var_out0;
    mo[MO_VOUT1 +: 2]  = var_out1;
    mo[MO_VRDY0]       = var_ready0;
    mo[MO_VRDY1]       = var_ready1;
    mo[MO_AACK]        = act_ack;
    mo[MO_SREQ0]       = seq_req[0];
    mo[MO_SREQ1]       = seq_req[1];
    mo[MO_FVACK]       = fv_ack;
    mo[MO_COUT +: 2]   = call_out;
    mo[MO_CIACK +: 4]  = call_iack;
    mo[MO_KREQ +: 4]   = case_req;
    mo[MO_KIACK]       = case_iack;
    mo[MO_EOUT +: 4]   = enc_out;
    mo[MO_EIACK +: 4]  = enc_iack;
  end

  lb_switch_box #(.N_IN(CLB_MOUT), .N_OUT(LB_OUT_W), .SW(OSB_SW)) u_osb (
    .sel(cfg.osb_sel), .in(mo), .out(term_out)
  );
endmodule
