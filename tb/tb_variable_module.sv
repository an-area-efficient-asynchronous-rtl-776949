// tb_variable_module: self-checking test of the two-bit Variable module.
// Writes random values through the LUT path (bit 0) and the var_in channel
// (bit 1) with four-phase handshakes, checks the write acknowledges and
// lut_ready, then reads both bits through both read ports (each port with
// its source select at 0 and 1) and checks that values survive between writes.
module tb_variable_module;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rd0_src, rd1_src;
  dr_t  lut_out, var_in, var_out0, var_out1;
  logic data_valid, data_spacer, lut_ready, rd_req0, rd_req1, var_ready0, var_ready1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  variable_module dut (.*);

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
    logic b0, b1;
    lut_out = '0; var_in = '0; data_valid = 0; data_spacer = 1;
    rd_req0 = 0; rd_req1 = 0; rd0_src = 0; rd1_src = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(var_out0 === DR_SPACER && var_out1 === DR_SPACER, "idle read ports spacer");
    check(lut_ready, "lut_ready after reset");
    for (int i = 0; i < 200; i++) begin
      b0 = 1'($urandom); b1 = 1'($urandom);
      // write bit 0 via LUT path
      lut_out = dr_enc(b0); data_valid = 1; data_spacer = 0;
      @(negedge clk);
      check(var_ready0, "write ack bit 0");
      check(!lut_ready, "lut_ready low while written");
      lut_out = DR_SPACER; data_valid = 0;
      @(negedge clk);
      check(var_ready0, "ack holds until operands spacer");
      data_spacer = 1;
      @(negedge clk);
      check(!var_ready0 && lut_ready, "write 0 return to zero");
      // write bit 1
      var_in = dr_enc(b1);
      @(negedge clk);
      check(var_ready1, "write ack bit 1");
      var_in = DR_SPACER;
      @(negedge clk);
      check(!var_ready1, "write 1 return to zero");
      // reads
      rd0_src = 1'($urandom);
      rd1_src = 1'($urandom);
      rd_req0 = 1; rd_req1 = 1;
      #1;
      check(var_out0 === dr_enc(rd0_src ? b1 : b0), "read port 0");
      check(var_out1 === dr_enc(rd1_src ? b1 : b0), "read port 1");
      @(negedge clk);
      rd_req0 = 0; rd_req1 = 0;
      #1;
      check(var_out0 === DR_SPACER && var_out1 === DR_SPACER, "read return to spacer");
      repeat (2) @(negedge clk);
      rd0_src = 0;
      rd_req0 = 1;
      #1;
      check(var_out0 === dr_enc(b0), "value persists");
      rd_req0 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
