// case_module: the Case module, steers a control handshake by a data value.
//
// case_in is a push channel of two dual-rail bits (a 2-bit selector). When the
// selector is valid, output request out_req[v] rises for its value v; when that
// output is acknowledged, in_ack rises. When the selector returns to the spacer
// the request falls, and when the output acknowledge has fallen in_ack falls.
// With one_bit set only bit 0 is used (outputs 0 and 1), which is the two-way
// Case of an if/else. Four outputs follow the complex-LB figure (CaseOut0..3);
// the controller is this implementation's own, built from registers of the
// sampling clock that emulates the asynchronous circuit.
module case_module
  import hc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       one_bit,     // configuration
  input  dr_t  [1:0] case_in,
  output logic       in_ack,
  output logic [3:0] out_req,
  input  logic [3:0] out_ack
);
  logic       sel_valid, sel_spacer;
  logic [1:0] v;

  assign sel_valid  = dr_valid(case_in[0]) & (one_bit | dr_valid(case_in[1]));
  assign sel_spacer = ~dr_valid(case_in[0]) & (one_bit | ~dr_valid(case_in[1]));
  assign v          = {case_in[1].t & ~one_bit, case_in[0].t};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_req <= '0;
      in_ack  <= 1'b0;
    end else begin
      if (sel_valid && out_req == '0 && !in_ack) out_req <= 4'b0001 << v;
      else if (sel_spacer)                       out_req <= '0;
      if (|(out_req & out_ack))                  in_ack <= 1'b1;
      else if (out_req == '0 && out_ack == '0)   in_ack <= 1'b0;
    end
  end
endmodule
