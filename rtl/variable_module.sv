// variable_module: the Variable module, two single-bit dual-rail variables.
//
// Bit 0 is written by the BinaryFunction module: when its result lut_out is
// valid and data_valid says every LUT operand is valid, the bit stores the
// result and var_ready0 (the write acknowledge) rises; when the result and all
// operands are back to the spacer, var_ready0 falls. lut_ready tells the
// BinaryFunction that the previous write has finished its return-to-zero.
// Bit 1 is written from var_in the same way and acknowledged on var_ready1.
// Two read ports: while rd_req0 (rd_req1) is high, var_out0 (var_out1) carries
// the stored bit in FPDR code, otherwise the spacer; the valid code is the read
// acknowledge. Each read port reads bit 0 or bit 1 as rd0_src / rd1_src
// selects, so one variable can have two readers. Stored bits survive
// between writes; reset clears both bits and both acknowledges.
// The port names follow the logic-block figures; the split into two bits and
// the read-port protocol are this implementation's choices. State elements are
// registers of the sampling clock that emulates the asynchronous gate delays.
module variable_module
  import hc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic rd0_src,      // configuration
  input  logic rd1_src,      // configuration
  // from the BinaryFunction module
  input  dr_t  lut_out,
  input  logic data_valid,
  input  logic data_spacer,
  output logic lut_ready,
  // direct write channel
  input  dr_t  var_in,
  // read ports
  input  logic rd_req0,
  input  logic rd_req1,
  output dr_t  var_out0,
  output dr_t  var_out1,
  // write acknowledges
  output logic var_ready0,
  output logic var_ready1
);
  logic val0, val1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val0       <= 1'b0;
      var_ready0 <= 1'b0;
    end else if (!var_ready0 && dr_valid(lut_out) && data_valid) begin
      val0       <= lut_out.t;
      var_ready0 <= 1'b1;
    end else if (var_ready0 && !dr_valid(lut_out) && data_spacer) begin
      var_ready0 <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val1       <= 1'b0;
      var_ready1 <= 1'b0;
    end else if (!var_ready1 && dr_valid(var_in)) begin
      val1       <= var_in.t;
      var_ready1 <= 1'b1;
    end else if (var_ready1 && !dr_valid(var_in)) begin
      var_ready1 <= 1'b0;
    end
  end

  assign lut_ready = ~var_ready0;
  assign var_out0  = rd_req0 ? dr_enc(rd0_src ? val1 : val0) : DR_SPACER;
  assign var_out1  = rd_req1 ? dr_enc(rd1_src ? val1 : val0) : DR_SPACER;
endmodule
