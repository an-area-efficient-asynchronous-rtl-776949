// tb_hcfpga_cell: self-checking test of one cell (simple LB) with its routing.
// Configures, through the cell's configuration write port:
//   switch block  west->east wire 0, north->south wire 1 (onto segment wire 2),
//                 south->west wire 3, east->west wire 2, west->east wire 1
//   upper CB      LB N1 wire 0 (var_ready0) onto westward wire 0; the S output
//                 of the LB above onto eastward wire 1 and back into its S input;
//                 westward wire 2 into N1 input 0 (read request)
//   right CB      LB E1 wires 0,1 (var_out0) onto southward wires 0,1; southward
//                 wire 1 into the W input of the right-hand LB
//   LB            3-input majority LUT on W; VarIn on S; var_ready1 on S out 2
// Checks every path with random values, the LUT result read back over the
// routing, and that nothing is connected before the configuration is written.
// Each CB registers its segment wires, so values are checked one clock after
// they are applied (two clocks where a path crosses two CBs).
module tb_hcfpga_cell;
  import hc_pkg::*;
  import hc_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we;
  cell_cfg_t cfg_wdata;
  logic [NH-1:0] h_from_w, h_to_w, sb_e_out, sb_e_in, sb_n_in, sb_n_out, v_to_s, v_from_s;
  logic [TW-1:0] up_s_out, up_s_in, lb_s_out, lb_s_in, lb_w_in, rt_w_in;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hcfpga_cell #(.COMPLEX(1'b0)) dut (.*);

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
    cell_cfg_t c;
    lb_cfg_t   l;
    logic [2:0] a;
    logic b;
    c = '0;
    c.sb.sel[SIDE_E][0] = sb_sel(SIDE_E, SIDE_W, 0);
    c.sb.sel[SIDE_E][1] = sb_sel(SIDE_E, SIDE_W, 1);
    c.sb.sel[SIDE_S][2] = sb_sel(SIDE_S, SIDE_N, 1);
    c.sb.sel[SIDE_W][3] = sb_sel(SIDE_W, SIDE_S, 3);
    c.sb.sel[SIDE_W][2] = sb_sel(SIDE_W, SIDE_E, 2);
    c.cb_up.seg_sel[NH + 0] = CB_SSW'(0 + 1);          // N1 out wire 0
    c.cb_up.seg_sel[1]      = CB_SSW'(2 * TW + 0 + 1); // S out of LB above, wire 0
    c.cb_up.term_sel[TW + 0] = CB_TSW'(1 + 1);         // S in of LB above <- seg 1
    c.cb_up.term_sel[0]      = CB_TSW'(NH + 2 + 1);    // N1 in 0 <- westward wire 2
    c.cb_rt.seg_sel[0] = CB_SSW'(0 + 1);               // E1 out 0
    c.cb_rt.seg_sel[1] = CB_SSW'(1 + 1);               // E1 out 1
    c.cb_rt.term_sel[TW + 0] = CB_TSW'(1 + 1);         // right LB W in 0 <- seg 1
    l = '0;
    l.lut = 8'hE8;
    route_in (l, MI_LUT, IN_W, 0, 6);
    route_in (l, MI_RD0, IN_N1, 0, 1);
    route_in (l, MI_VARIN, IN_S, 0, 2);
    route_out(l, MO_VOUT0, OUT_E1, 0, 2);
    route_out(l, MO_VRDY0, OUT_N1, 0, 1);
    route_out(l, MO_VRDY1, OUT_S, 2, 1);
    c.lb = l;
    cfg_we = 0; cfg_wdata = c;
    h_from_w = '0; sb_e_in = '0; sb_n_in = '0; v_from_s = '0;
    up_s_out = '0; lb_s_in = '0; lb_w_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // unconfigured: inputs do not reach outputs
    h_from_w = '1; sb_n_in = '1; v_from_s = '1; up_s_out = '1;
    @(negedge clk);
    check(sb_e_out === '0 && v_to_s === '0 && h_to_w === '0 && up_s_in === '0,
          "nothing routed before configuration");
    h_from_w = '0; sb_n_in = '0; v_from_s = '0; up_s_out = '0;
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    for (int i = 0; i < 200; i++) begin
      h_from_w[0] = 1'($urandom);
      sb_n_in[1]  = 1'($urandom);
      v_from_s[3] = 1'($urandom);
      up_s_out[0] = 1'($urandom);
      repeat (2) @(negedge clk);          // south to west crosses two CBs
      check(sb_e_out[0] === h_from_w[0], "west to east");
      check(v_to_s[2] === sb_n_in[1], "north to south");
      check(h_to_w[3] === v_from_s[3], "south to west");
      check(up_s_in[0] === up_s_out[0] && sb_e_out[1] === up_s_out[0], "S terminal of LB above via upper CB");
      // LUT write over W, read back over routing
      a = 3'($urandom);
      for (int k = 0; k < 3; k++) lb_w_in[2*k +: 2] = {a[k], ~a[k]};
      for (int n = 0; n < 10 && !h_to_w[0]; n++) @(negedge clk);
      check(h_to_w[0], "var_ready0 reaches westward wire 0");
      lb_w_in = '0;
      for (int n = 0; n < 10 && h_to_w[0]; n++) @(negedge clk);
      sb_e_in[2] = 1'b1;                  // read request from the east
      repeat (2) @(negedge clk);          // request and data each cross one CB
      check(v_to_s[1:0] === {(a[0] & a[1]) | (a[0] & a[2]) | (a[1] & a[2]),
                            ~((a[0] & a[1]) | (a[0] & a[2]) | (a[1] & a[2]))},
            $sformatf("majority(%b) read over the routing", a));
      check(rt_w_in[0] === v_to_s[1], "W input of right LB");
      sb_e_in[2] = 1'b0;
      // VarIn over S
      b = 1'($urandom);
      lb_s_in[1:0] = {b, ~b};
      for (int n = 0; n < 10 && !lb_s_out[2]; n++) @(negedge clk);
      check(lb_s_out[2], "var_ready1 on S terminal");
      lb_s_in[1:0] = '0;
      for (int n = 0; n < 10 && lb_s_out[2]; n++) @(negedge clk);
      check(!lb_s_out[2], "var_ready1 returns to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
