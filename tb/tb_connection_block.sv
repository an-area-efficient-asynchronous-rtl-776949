// tb_connection_block: self-checking test of the Connection Block.
// Random configurations, segment values and LB output values, compared with
// a reference model of the segment multiplexers and terminal multiplexers.
// The segment wires are registered, so each result is checked one clock after
// its inputs are applied; reset must clear the segment.
module tb_connection_block;
  import hc_pkg::*;
  cb_cfg_t               cfg;
  logic [NT-1:0]         seg_raw, seg_out, exp_seg;
  logic [CB_DRV_W-1:0]   drv;
  logic [2*TW-1:0]       term_in;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  connection_block dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    for (int k = 0; k < NT; k++) cfg.seg_sel[k] = CB_SSW'(k + 1);
    for (int k = 0; k < 2*TW; k++) cfg.term_sel[k] = CB_TSW'(k % NT + 1);
    seg_raw = '1; drv = '1;
    repeat (2) @(negedge clk);
    checks++;
    if (seg_out !== '0 || term_in !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < NT; k++)
        cfg.seg_sel[k] = ($urandom_range(0, 1) == 0) ? '0 : CB_SSW'($urandom_range(1, CB_DRV_W));
      for (int k = 0; k < 2*TW; k++) cfg.term_sel[k] = CB_TSW'($urandom_range(0, NT));
      seg_raw = NT'($urandom);
      drv     = CB_DRV_W'($urandom);
      @(negedge clk);
      for (int k = 0; k < NT; k++)
        exp_seg[k] = (cfg.seg_sel[k] == 0) ? seg_raw[k] : drv[cfg.seg_sel[k] - 1];
      checks++;
      if (seg_out !== exp_seg) begin failures++; $display("FAIL seg_out %b exp %b", seg_out, exp_seg); end
      for (int k = 0; k < 2*TW; k++) begin
        checks++;
        if (term_in[k] !== (cfg.term_sel[k] == 0 ? 1'b0 : exp_seg[cfg.term_sel[k] - 1])) begin
          failures++;
          $display("FAIL term_in[%0d]", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
