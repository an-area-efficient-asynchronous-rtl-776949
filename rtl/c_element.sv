// c_element: Muller C-element with N inputs.
//
// The output rises when every input is 1, falls when every input is 0 and
// otherwise keeps its value. In the simple logic block it joins the two write
// acknowledges of the Variable module into one acknowledge (FalseVariable.ack).
// The fabric is asynchronous; this implementation emulates it with a sampling
// clock, so the C-element's state is a flip-flop and its output follows its
// inputs one clock later (one "gate delay"). Reset clears the output.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out <= 1'b0;
    else if (&in)      out <= 1'b1;
    else if (~|in)     out <= 1'b0;
  end
endmodule
