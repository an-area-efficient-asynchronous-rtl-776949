// tb_simple_lb: self-checking test of the simple logic block through its terminals.
// Configuration: LUT = 3-input XOR with operands on W (wires 0-5); VarIn on S
// wires 0-1; read requests on S wires 2 and 3; VarOut0 and var_ready0 on E1
// wires 0-2; VarOut1 and var_ready1 on N1 wires 0-2; the C-element
// (FalseVariable ack) on E2 w 0. Checks the LUT result written and read
// back, the direct write, both read ports and that the C-element ack rises
// only when both writes are held and falls only when both are released.
module tb_simple_lb;
  import hc_pkg::*;
  import hc_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  lb_cfg_t cfg;
  logic [LB_IN_W-1:0]  term_in;
  logic [LB_OUT_W-1:0] term_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  simple_lb dut (.clk, .rst_n, .cfg, .term_in, .term_out);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic dr_t get(int term, int w);
    return '{t: term_out[tout(term, w + 1)], f: term_out[tout(term, w)]};
  endfunction

  task automatic put(int term, int w, dr_t d);
    term_in[tin(term, w)]     = d.f;
    term_in[tin(term, w + 1)] = d.t;
  endtask

  task automatic wait_bit(int idx, logic val);
    for (int n = 0; n < 20 && term_out[idx] != val; n++) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] a;
    logic b;
    cfg = '0;
    cfg.lut = 8'h96;
    route_in(cfg, MI_LUT, IN_W, 0, 6);
    route_in(cfg, MI_VARIN, IN_S, 0, 2);
    route_in(cfg, MI_RD0, IN_S, 2, 1);
    route_in(cfg, MI_RD1, IN_S, 3, 1);
    route_out(cfg, MO_VOUT0, OUT_E1, 0, 2);
    route_out(cfg, MO_VRDY0, OUT_E1, 2, 1);
    route_out(cfg, MO_VOUT1, OUT_N1, 0, 2);
    route_out(cfg, MO_VRDY1, OUT_N1, 2, 1);
    route_out(cfg, MO_SFVA, OUT_E2, 0, 1);
    cfg.rd1_src = 1'b1;
    term_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      a = 3'($urandom);
      b = 1'($urandom);
      // both writes at once; the C-element must join them
      for (int k = 0; k < 3; k++) put(IN_W, 2 * k, dr_enc(a[k]));
      wait_bit(tout(OUT_E1, 2), 1'b1);
      check(term_out[tout(OUT_E1, 2)], "LUT write acknowledged on E1");
      repeat (2) @(negedge clk);
      check(!term_out[tout(OUT_E2, 0)], "C-element waits for the second write");
      put(IN_S, 0, dr_enc(b));
      wait_bit(tout(OUT_E2, 0), 1'b1);
      check(term_out[tout(OUT_E2, 0)] && term_out[tout(OUT_N1, 2)], "C-element ack after both writes");
      // release LUT operands only: the C-element holds
      for (int k = 0; k < 3; k++) put(IN_W, 2 * k, DR_SPACER);
      wait_bit(tout(OUT_E1, 2), 1'b0);
      repeat (2) @(negedge clk);
      check(term_out[tout(OUT_E2, 0)], "C-element holds with one write released");
      put(IN_S, 0, DR_SPACER);
      wait_bit(tout(OUT_E2, 0), 1'b0);
      check(!term_out[tout(OUT_E2, 0)], "C-element falls after both released");
      // reads
      term_in[tin(IN_S, 2)] = 1'b1;
      term_in[tin(IN_S, 3)] = 1'b1;
      #1;
      check(get(OUT_E1, 0) === dr_enc(^a), $sformatf("xor(%b) read back", a));
      check(get(OUT_N1, 0) === dr_enc(b), "direct write read back");
      term_in[tin(IN_S, 2)] = 1'b0;
      term_in[tin(IN_S, 3)] = 1'b0;
      #1;
      check(get(OUT_E1, 0) === DR_SPACER, "read port returns to spacer");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
