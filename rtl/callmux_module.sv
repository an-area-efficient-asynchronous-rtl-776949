// callmux_module: the CallMUX module, merges four mutually exclusive push channels.
//
// Each input i is a dual-rail bit (FPDR: a valid code is the request) with its
// own acknowledge in_ack[i]. The output data is the OR of the four inputs, so
// the one active input appears on call_out; the output acknowledge out_ack is
// returned to the active input through a C-element per input
// (in_ack[i] = C(valid(in[i]), out_ack)). For the data-less Call, Continue and
// friends the t wire of an input is used as its request. Callers must be
// mutually exclusive, as the handshake component requires. The acknowledge
// C-elements are registers of the sampling clock that emulates the
// asynchronous circuit; the data path is combinational. The port count (four)
// follows the complex-LB figure; the circuit is this implementation's own.
module callmux_module
  import hc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  dr_t  [3:0] call_in,
  output logic [3:0] in_ack,
  output dr_t        call_out,
  input  logic       out_ack
);
  always_comb begin
    call_out = DR_SPACER;
    for (int i = 0; i < 4; i++) begin
      call_out.t |= call_in[i].t;
      call_out.f |= call_in[i].f;
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_ack
    c_element #(.N(2)) u_c (
      .clk, .rst_n,
      .in ({dr_valid(call_in[i]), out_ack}),
      .out(in_ack[i])
    );
  end
endmodule
