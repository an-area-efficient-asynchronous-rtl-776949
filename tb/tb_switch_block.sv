// tb_switch_block: self-checking test of the Switch Block.
// Random configurations and incoming wire values, compared with a reference
// that decodes each selection into (other side, wire).
module tb_switch_block;
  import hc_pkg::*;
  sb_cfg_t            cfg;
  logic [3:0][NH-1:0] in, out;
  int checks = 0, failures = 0;

  switch_block dut (.*);

  function automatic logic expect_bit(int s, int k);
    int j, side, w;
    j = int'(cfg.sel[s][k]);
    if (j == 0) return 1'b0;
    side = (s + (j - 1) / NH + 1) % 4;
    w    = (j - 1) % NH;
    return in[side][w];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int s = 0; s < 4; s++)
        for (int k = 0; k < NH; k++) cfg.sel[s][k] = SB_SW'($urandom_range(0, 3 * NH));
      in = (4 * NH)'($urandom);
      #1;
      for (int s = 0; s < 4; s++)
        for (int k = 0; k < NH; k++) begin
          checks++;
          if (out[s][k] !== expect_bit(s, k)) begin
            failures++;
            $display("FAIL side %0d wire %0d sel %0d", s, k, cfg.sel[s][k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
