// binary_function: the BinaryFunction module, a dual-rail look-up table.
//
// LUT_K dual-rail operands arrive on lut_in. When all of them are valid and the
// Variable module signals lut_ready, the output lut_out takes the table entry
// for the operand values in FPDR code; when all operands have returned to the
// spacer, lut_out returns to the spacer; in between it holds (the hysteresis a
// C-element gives a dual-rail gate). data_valid and data_spacer are the
// completion signals passed to the Variable module so that its acknowledge
// covers every operand. The table index is {op[K-1],...,op[0]}.
// The port names follow the logic-block figures; the K=3 table and the
// ready-gating are this implementation's choices. The output is a register of
// the sampling clock that emulates the asynchronous gate delays.
module binary_function
  import hc_pkg::*;
#(
  parameter int unsigned K = LUT_K
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2**K-1:0] lut,          // configuration: truth table
  input  dr_t  [K-1:0]    lut_in,
  input  logic            lut_ready,
  output dr_t             lut_out,
  output logic            data_valid,
  output logic            data_spacer
);
  logic [K-1:0] idx;
  logic [K-1:0] v;

  always_comb begin
    for (int i = 0; i < K; i++) begin
      idx[i] = lut_in[i].t;
      v[i]   = dr_valid(lut_in[i]);
    end
    data_valid  = &v;
    data_spacer = ~|v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        lut_out <= DR_SPACER;
    else if (data_valid && lut_ready)  lut_out <= dr_enc(lut[idx]);
    else if (data_spacer)              lut_out <= DR_SPACER;
  end
endmodule
