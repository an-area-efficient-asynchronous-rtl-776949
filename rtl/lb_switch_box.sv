// lb_switch_box: the Input and Output switch boxes of a logic block.
//
// A configurable crossbar: each of N_OUT output wires is driven by one of N_IN
// input wires or tied low. sel[k] = 0 ties output k low, sel[k] = j (1..N_IN)
// connects input wire j-1. The input switch box uses it to feed the module
// inputs from the N1, W, S and E1 terminals; the output switch box uses it to
// drive the N1, N2, S, E1 and E2 terminals from the module outputs. Purely
// combinational. Full crossbars are this implementation's choice; the
// architecture says only that the boxes connect the modules to the
// connection blocks.
module lb_switch_box #(
  parameter int unsigned N_IN  = 24,
  parameter int unsigned N_OUT = 37,
  parameter int unsigned SW    = $clog2(N_IN + 1)
) (
  input  logic [N_OUT-1:0][SW-1:0] sel,
  input  logic [N_IN-1:0]          in,
  output logic [N_OUT-1:0]         out
);
  always_comb begin
    for (int k = 0; k < N_OUT; k++) begin
      out[k] = 1'b0;
      for (int j = 0; j < N_IN; j++)
        if (32'(sel[k]) == j + 1) out[k] = in[j];
    end
  end
endmodule
