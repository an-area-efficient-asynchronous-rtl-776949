// tb_binary_function: self-checking test of the dual-rail LUT.
// For random truth tables and operands: a valid operand set with lut_ready
// gives the table entry in FPDR code one clock later; with lut_ready low the
// output stays spacer; a partial spacer holds the result; a full spacer clears
// it. Completion outputs data_valid / data_spacer are checked too.
module tb_binary_function;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] lut;
  dr_t  [2:0] lut_in;
  logic lut_ready;
  dr_t  lut_out;
  logic data_valid, data_spacer;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  binary_function #(.K(3)) dut (.clk, .rst_n, .lut, .lut_in, .lut_ready,
                                .lut_out, .data_valid, .data_spacer);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] a;
    lut_in = '0; lut = '0; lut_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      lut = 8'($urandom);
      a   = 3'($urandom);
      // not ready: operands valid but output must stay spacer
      @(negedge clk);
      lut_ready = 1'b0;
      for (int k = 0; k < 3; k++) lut_in[k] = dr_enc(a[k]);
      @(negedge clk);
      check(data_valid && !data_spacer, "data_valid with all operands valid");
      check(lut_out === DR_SPACER, "no evaluation while lut_ready is low");
      lut_ready = 1'b1;
      @(negedge clk);
      check(lut_out === dr_enc(lut[a]), $sformatf("lut=%h a=%0d out=%b", lut, a, lut_out));
      // one operand returns to spacer: output holds
      lut_in[0] = DR_SPACER;
      @(negedge clk);
      check(!data_valid && !data_spacer, "partial spacer: neither completion");
      check(lut_out === dr_enc(lut[a]), "result held during partial spacer");
      lut_in = '0;
      @(negedge clk);
      check(data_spacer, "data_spacer with all operands spacer");
      check(lut_out === DR_SPACER, "spacer after all operands spacer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
