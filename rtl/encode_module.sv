// encode_module: the Encode module, turns "which of four inputs" into data.
//
// Each input i is a request wire enc_req[i] (inputs are mutually exclusive).
// The output enc_out is two dual-rail bits carrying the index i of the active
// input: bit j is (1,0) when i has bit j set and (0,1) otherwise, and the
// spacer when no input requests. The output acknowledge returns to the active
// input through a C-element per input (in_ack[i] = C(enc_req[i], out_ack)).
// Four inputs follow the complex-LB figure (EncodeIn0..3); the index code is
// this implementation's choice. The data path is combinational; the acknowledge
// C-elements are registers of the sampling clock that emulates the
// asynchronous circuit.
module encode_module
  import hc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] enc_req,
  output logic [3:0] in_ack,
  output dr_t  [1:0] enc_out,
  input  logic       out_ack
);
  assign enc_out[0] = '{t: enc_req[1] | enc_req[3], f: enc_req[0] | enc_req[2]};
  assign enc_out[1] = '{t: enc_req[2] | enc_req[3], f: enc_req[0] | enc_req[1]};

  for (genvar i = 0; i < 4; i++) begin : g_ack
    c_element #(.N(2)) u_c (
      .clk, .rst_n,
      .in ({enc_req[i], out_ack}),
      .out(in_ack[i])
    );
  end
endmodule
