// tb_hcfpga_array: end-to-end test of the FPGA fabric at its default size (6 x 4).
//
// The test places and routes two handshake circuits by hand, writes the
// configuration through the cell configuration port and runs them.
//
// Circuit 1, a one-bit version of the counter handshake circuit
//   activate -> Loop -> Sequence( Concur( q -> output , NOT(q) -> tmp ), tmp -> q )
//   Loop      complex LB (0,0)   activation from pin west_in[0]
//   Sequence  complex LB (0,1)
//   Concur    complex LB (0,2)
//   q         simple LB (1,1), bit 1 of its Variable, written from VarIn; read
//             port 1 feeds the output, read port 0 feeds the LUT of tmp
//   tmp       simple LB (1,2), LUT = NOT into bit 0 of its Variable
//   Fetches are wires: Concur request -> read request, read data -> write data
//   or output, write acknowledge / consumer acknowledge -> Concur acknowledge.
//   q leaves over three switch blocks to pins east_h_out[2][1:0] (F, T); the
//   testbench acknowledges on north_in[2][0]. Expected outputs: 0,1,0,1,...
//
// Circuit 2, Case -> Encode
//   Case      complex LB (2,0): selector (2 dual-rail bits) on pins west_in[2][3:0]
//   Encode    complex LB (2,1): its four inputs are the four Case outputs
//   The Encode result leaves over three switch blocks to south_v_out[1][3:0];
//   its acknowledge enters at west_h_in[3][0]; the Case input acknowledge
//   leaves at west_h_out[3][0]. The encoded index must equal the selector.
//
// Circuit 3, CallMUX and While in one complex LB (4,0), all on pins
//   CallMUX   inputs 0 and 1 on west_in[4][3:0], output acknowledge on
//             west_in[4][4]; output and input acknowledges leave through the
//             upper CB on west_h_out[4][3:0]
//   While     activation on west_in[4][5]; guard (dual-rail) and body
//             acknowledge enter through the upper CB on west_h_in[4][2:0];
//             activation acknowledge, guard request and body request leave on
//             the S terminal, through the CB of cell (5,0), at west_h_out[5][2:0]
//   Every call must appear on the output and be acknowledged to its own caller
//   only; every While run must execute the body exactly as often as the
//   guards say.
//
// Circuit 4, FalseVariable join in simple LB (5,3), on the south pins
//   LUT (identity on one operand) writes bit 0 and VarIn writes bit 1 from
//   south_in[3]; the C-element output (south_out[3][2]) must rise only when
//   both writes are held. Read port 0 returns bit 0 on south_out[3][4:3]; read
//   port 1 returns bit 1 over the right CB at east_out[5][1:0].
//
// Counted mechanisms (each must happen): loop iterations, Sequence and Concur
// completions, LUT writes, VarIn writes, reads, Case steering to every
// output, Encode results, calls through each CallMUX input, While body runs
// and completions, C-element joins, multi-hop switch-block routes,
// connection-block drives, configuration writes.
module tb_hcfpga_array;
  import hc_pkg::*;
  import hc_tb_pkg::*;
  localparam int ROWS = 6, COLS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                        cfg_we;
  logic [$clog2(ROWS+1)-1:0]   cfg_row;
  logic [$clog2(COLS+1)-1:0]   cfg_col;
  cell_cfg_t                   cfg_wdata;
  logic [ROWS-1:0][NH-1:0]     west_h_in, west_h_out, east_h_in, east_h_out;
  logic [COLS-1:0][NH-1:0]     north_v_in, north_v_out, south_v_in, south_v_out;
  logic [COLS-1:0][TW-1:0]     north_in, north_out, south_in, south_out;
  logic [ROWS-1:0][TW-1:0]     west_in, east_out;

  hcfpga_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cell_cfg_t cc [ROWS][COLS];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- configuration helpers ----------------
  function automatic int F(int k); return k; endfunction
  function automatic int B(int k); return NH + k; endfunction

  function automatic void lb_in(int r, int c, int mi, int term, int w, int n);
    for (int i = 0; i < n; i++) cc[r][c].lb.isb_sel[mi + i] = isb(term, w + i);
  endfunction
  function automatic void lb_out(int r, int c, int mo, int term, int w, int n);
    for (int i = 0; i < n; i++) cc[r][c].lb.osb_sel[term * TW + w + i] = osb(mo + i);
  endfunction
  // right CB of cell (r,c): put E1/E2 output wire e on segment wire s
  function automatic void rt_drive(int r, int c, int s, int e);
    cc[r][c].cb_rt.seg_sel[s] = CB_SSW'(e + 1);
  endfunction
  // right CB: segment wire s into W input wire w of LB (r,c+1)
  function automatic void rt_to_w(int r, int c, int s, int w);
    cc[r][c].cb_rt.term_sel[TW + w] = CB_TSW'(s + 1);
  endfunction
  // upper CB of cell (r,c): put N1/N2 output wire n of LB (r,c) on segment wire s
  function automatic void up_drive_n(int r, int c, int s, int n);
    cc[r][c].cb_up.seg_sel[s] = CB_SSW'(n + 1);
  endfunction
  // upper CB: put S output wire w of the LB above (or north pin) on segment wire s
  function automatic void up_drive_s(int r, int c, int s, int w);
    cc[r][c].cb_up.seg_sel[s] = CB_SSW'(2 * TW + w + 1);
  endfunction
  function automatic void up_to_n1(int r, int c, int s, int w);
    cc[r][c].cb_up.term_sel[w] = CB_TSW'(s + 1);
  endfunction
  function automatic void up_to_s(int r, int c, int s, int w);
    cc[r][c].cb_up.term_sel[TW + w] = CB_TSW'(s + 1);
  endfunction
  // switch block at the top-right corner of cell (r,c)
  function automatic void sbx(int r, int c, int out_side, int k, int in_side, int w);
    cc[r][c].sb.sel[out_side][k] = sb_sel(out_side, in_side, w);
  endfunction

  function automatic void place_and_route();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) cc[r][c] = '0;
    // ---- circuit 1: counter ----
    cc[0][0].lb.seq_mode = SEQ_LOOP;
    cc[0][1].lb.seq_mode = SEQ_SEQUENCE;
    cc[0][2].lb.seq_mode = SEQ_CONCUR;
    cc[1][1].lb.rd0_src  = 1'b1;           // both read ports of q read bit 1
    cc[1][1].lb.rd1_src  = 1'b1;
    cc[1][2].lb.lut      = 8'h55;          // NOT of operand 0
    // activation of the Loop from pin
    lb_in(0, 0, MI_ACT, IN_W, 0, 1);
    // Loop out0 -> Sequence activate
    lb_out(0, 0, MO_SREQ0, OUT_E1, 0, 1);
    rt_drive(0, 0, F(0), 0); rt_to_w(0, 0, F(0), 0);
    lb_in(0, 1, MI_ACT, IN_W, 0, 1);
    // Sequence ack -> Loop out0 ack (leftward over SB)
    lb_out(0, 1, MO_AACK, OUT_N1, 0, 1);
    up_drive_n(0, 1, B(0), 0); sbx(0, 0, SIDE_W, 0, SIDE_E, 0); up_to_n1(0, 0, B(0), 0);
    lb_in(0, 0, MI_SACK0, IN_N1, 0, 1);
    // Sequence out0 -> Concur activate
    lb_out(0, 1, MO_SREQ0, OUT_E1, 0, 1);
    rt_drive(0, 1, F(0), 0); rt_to_w(0, 1, F(0), 0);
    lb_in(0, 2, MI_ACT, IN_W, 0, 1);
    // Concur ack -> Sequence out0 ack
    lb_out(0, 2, MO_AACK, OUT_N1, 0, 1);
    up_drive_n(0, 2, B(1), 0); sbx(0, 1, SIDE_W, 1, SIDE_E, 1); up_to_n1(0, 1, B(1), 1);
    lb_in(0, 1, MI_SACK0, IN_N1, 1, 1);
    // Sequence out1 -> read request of tmp (port 0 of LB (1,2)), diagonal route
    lb_out(0, 1, MO_SREQ1, OUT_E1, 1, 1);
    rt_drive(0, 1, F(1), 1); sbx(1, 1, SIDE_E, 1, SIDE_N, 1); up_to_n1(1, 2, F(1), 0);
    lb_in(1, 2, MI_RD0, IN_N1, 0, 1);
    // tmp data -> VarIn of q (leftward over SB)
    lb_out(1, 2, MO_VOUT0, OUT_N1, 0, 2);
    up_drive_n(1, 2, B(2), 0); up_drive_n(1, 2, B(3), 1);
    sbx(1, 1, SIDE_W, 2, SIDE_E, 2); sbx(1, 1, SIDE_W, 3, SIDE_E, 3);
    up_to_n1(1, 1, B(2), 2); up_to_n1(1, 1, B(3), 3);
    lb_in(1, 1, MI_VARIN, IN_N1, 2, 2);
    // q write ack -> Sequence out1 ack (upward)
    lb_out(1, 1, MO_VRDY1, OUT_N1, 0, 1);
    up_drive_n(1, 1, F(0), 0); up_to_s(1, 1, F(0), 0);
    lb_in(0, 1, MI_SACK1, IN_S, 0, 1);
    // Concur out0 -> q read port 1 ; Concur out1 -> q read port 0
    lb_out(0, 2, MO_SREQ0, OUT_S, 0, 2);
    up_drive_s(1, 2, B(0), 0); up_drive_s(1, 2, B(1), 1);
    sbx(1, 1, SIDE_W, 0, SIDE_E, 0); sbx(1, 1, SIDE_W, 1, SIDE_E, 1);
    up_to_n1(1, 1, B(0), 0); up_to_n1(1, 1, B(1), 1);
    lb_in(1, 1, MI_RD1, IN_N1, 0, 1);
    lb_in(1, 1, MI_RD0, IN_N1, 1, 1);
    // q (read port 0) -> all three LUT operands of tmp
    lb_out(1, 1, MO_VOUT0, OUT_E1, 0, 2);
    rt_drive(1, 1, F(0), 0); rt_drive(1, 1, F(1), 1);
    rt_to_w(1, 1, F(0), 0); rt_to_w(1, 1, F(1), 1);
    for (int k = 0; k < LUT_K; k++) lb_in(1, 2, MI_LUT + 2 * k, IN_W, 0, 2);
    // tmp write ack -> Concur out1 ack (upward)
    lb_out(1, 2, MO_VRDY0, OUT_N1, 2, 1);
    up_drive_n(1, 2, F(0), 2); up_to_s(1, 2, F(0), 0);
    lb_in(0, 2, MI_SACK1, IN_S, 0, 1);
    // q (read port 1) -> east pins of row 2 over three switch blocks
    lb_out(1, 1, MO_VOUT1, OUT_S, 0, 2);
    up_drive_s(2, 1, F(0), 0); up_drive_s(2, 1, F(1), 1);
    for (int c = 1; c < COLS; c++) begin
      sbx(2, c, SIDE_E, 0, SIDE_W, 0);
      sbx(2, c, SIDE_E, 1, SIDE_W, 1);
    end
    // consumer acknowledge from north pin -> Concur out0 ack
    up_drive_s(0, 2, F(2), 0); up_to_n1(0, 2, F(2), 0);
    lb_in(0, 2, MI_SACK0, IN_N1, 0, 1);

    // ---- circuit 2: Case -> Encode ----
    lb_in(2, 0, MI_CASE, IN_W, 0, 4);
    lb_out(2, 0, MO_KREQ, OUT_E1, 0, 4);
    for (int k = 0; k < 4; k++) begin
      rt_drive(2, 0, F(k), k); rt_to_w(2, 0, F(k), k);
      // Encode input acks back to the Case output acks
      up_drive_n(2, 1, B(k), k); sbx(2, 0, SIDE_W, k, SIDE_E, k); up_to_n1(2, 0, B(k), k);
    end
    lb_in(2, 1, MI_ENC, IN_W, 0, 4);
    lb_out(2, 1, MO_EIACK, OUT_N1, 0, 4);
    lb_in(2, 0, MI_KACK, IN_N1, 0, 4);
    // Case input ack -> west pin of row 3
    lb_out(2, 0, MO_KIACK, OUT_S, 0, 1);
    up_drive_s(3, 0, B(0), 0);
    // Encode result -> south pins of column 1 over three switch blocks
    lb_out(2, 1, MO_EOUT, OUT_E1, 0, 4);
    for (int k = 0; k < 4; k++) begin
      rt_drive(2, 1, F(k), k);
      for (int r = 3; r < ROWS; r++) sbx(r, 1, SIDE_S, k, SIDE_N, k);
    end
    // Encode output ack from west pin of row 3
    sbx(3, 0, SIDE_E, 0, SIDE_W, 0); up_to_s(3, 1, F(0), 0);
    lb_in(2, 1, MI_EACK, IN_S, 0, 1);

    // ---- circuit 3: CallMUX and While in complex LB (4,0) ----
    cc[4][0].lb.seq_mode = SEQ_WHILE;
    lb_in(4, 0, MI_CALL, IN_W, 0, 4);
    lb_in(4, 0, MI_CACK, IN_W, 4, 1);
    lb_in(4, 0, MI_ACT,  IN_W, 5, 1);
    for (int k = 0; k < 3; k++) up_to_n1(4, 0, F(k), k);
    lb_in(4, 0, MI_GUARD, IN_N1, 0, 2);
    lb_in(4, 0, MI_SACK1, IN_N1, 2, 1);
    lb_out(4, 0, MO_COUT,  OUT_N1, 0, 2);
    lb_out(4, 0, MO_CIACK, OUT_N1, 2, 2);
    for (int k = 0; k < 4; k++) up_drive_n(4, 0, B(k), k);
    lb_out(4, 0, MO_AACK,  OUT_S, 0, 1);
    lb_out(4, 0, MO_SREQ0, OUT_S, 1, 1);
    lb_out(4, 0, MO_SREQ1, OUT_S, 2, 1);
    for (int k = 0; k < 3; k++) up_drive_s(5, 0, B(k), k);

    // ---- circuit 4: FalseVariable join in simple LB (5,3) ----
    cc[5][3].lb.lut     = 8'h80;           // f(a,a,a) = a
    cc[5][3].lb.rd0_src = 1'b0;
    cc[5][3].lb.rd1_src = 1'b1;
    for (int k = 0; k < LUT_K; k++) lb_in(5, 3, MI_LUT + 2 * k, IN_S, 0, 2);
    lb_in(5, 3, MI_VARIN, IN_S, 2, 2);
    lb_in(5, 3, MI_RD0,   IN_S, 4, 1);
    lb_in(5, 3, MI_RD1,   IN_S, 5, 1);
    lb_out(5, 3, MO_VRDY0, OUT_S, 0, 1);
    lb_out(5, 3, MO_VRDY1, OUT_S, 1, 1);
    lb_out(5, 3, MO_SFVA,  OUT_S, 2, 1);
    lb_out(5, 3, MO_VOUT0, OUT_S, 3, 2);
    lb_out(5, 3, MO_VOUT1, OUT_E1, 0, 2);
    for (int k = 0; k < 2; k++) begin rt_drive(5, 3, F(k), k); rt_to_w(5, 3, F(k), k); end
  endfunction

  // ---------------- environment ----------------
  logic       out_ack;          // consumer of q
  int         n_out;
  logic       exp_q;
  logic       enc_ack;          // consumer of the Encode result
  int         n_enc;
  logic [1:0] sel_v;
  logic       run;
  logic [2:0] w4_in;            // west_h_in[4]: body ack, guard (t, f)

  dr_t q_pin;
  dr_t [1:0] enc_pin;
  assign q_pin   = '{t: east_h_out[2][1], f: east_h_out[2][0]};
  assign enc_pin = south_v_out[1][3:0];

  always_comb begin
    north_in = '0;
    north_in[2][0] = out_ack;
    west_h_in = '0;
    west_h_in[3][0] = enc_ack;
    west_h_in[4][2:0] = w4_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !run) begin
      out_ack <= 1'b0; n_out <= 0; exp_q <= 1'b0;
      enc_ack <= 1'b0; n_enc <= 0;
    end else begin
      if (!out_ack && dr_valid(q_pin) && $urandom_range(0, 1) == 1) begin
        checks++;
        if (q_pin.t != exp_q) begin
          failures++;
          $display("FAIL: counter output %0d is %0d, expected %0d", n_out, q_pin.t, exp_q);
        end
        exp_q   <= ~exp_q;
        n_out   <= n_out + 1;
        out_ack <= 1'b1;
      end else if (out_ack && !dr_valid(q_pin)) begin
        out_ack <= 1'b0;
      end
      if (!enc_ack && dr_valid(enc_pin[0]) && dr_valid(enc_pin[1])) begin
        checks++;
        if ({enc_pin[1].t, enc_pin[0].t} != sel_v) begin
          failures++;
          $display("FAIL: encode result %0d, selector %0d", {enc_pin[1].t, enc_pin[0].t}, sel_v);
        end
        n_enc   <= n_enc + 1;
        enc_ack <= 1'b1;
      end else if (enc_ack && !dr_valid(enc_pin[0]) && !dr_valid(enc_pin[1])) begin
        enc_ack <= 1'b0;
      end
    end
  end

  // ---------------- mechanism counters (observed on LB output terminals) ----------------
  int n_loop, n_seq, n_concur, n_lutw, n_varw, n_case[4], n_cfg, n_caseack;
  logic p_loop, p_seq, p_concur, p_lutw, p_varw, p_caseack;
  logic [3:0] p_case;

  always_ff @(posedge clk) begin
    p_loop    <= dut.g_row[0].g_col[0].u_cell.term_out[tout(OUT_E1, 0)];
    p_seq     <= dut.g_row[0].g_col[1].u_cell.term_out[tout(OUT_N1, 0)];
    p_concur  <= dut.g_row[0].g_col[2].u_cell.term_out[tout(OUT_N1, 0)];
    p_lutw    <= dut.g_row[1].g_col[2].u_cell.term_out[tout(OUT_N1, 2)];
    p_varw    <= dut.g_row[1].g_col[1].u_cell.term_out[tout(OUT_N1, 0)];
    p_case    <= dut.g_row[2].g_col[0].u_cell.term_out[tout(OUT_E1, 0) +: 4];
    p_caseack <= west_h_out[3][0];
    if (!rst_n) begin
      n_loop <= 0; n_seq <= 0; n_concur <= 0; n_lutw <= 0; n_varw <= 0;
      n_caseack <= 0;
      for (int k = 0; k < 4; k++) n_case[k] <= 0;
    end else begin
      if (dut.g_row[0].g_col[0].u_cell.term_out[tout(OUT_E1, 0)] && !p_loop) n_loop <= n_loop + 1;
      if (dut.g_row[0].g_col[1].u_cell.term_out[tout(OUT_N1, 0)] && !p_seq) n_seq <= n_seq + 1;
      if (dut.g_row[0].g_col[2].u_cell.term_out[tout(OUT_N1, 0)] && !p_concur) n_concur <= n_concur + 1;
      if (dut.g_row[1].g_col[2].u_cell.term_out[tout(OUT_N1, 2)] && !p_lutw) n_lutw <= n_lutw + 1;
      if (dut.g_row[1].g_col[1].u_cell.term_out[tout(OUT_N1, 0)] && !p_varw) n_varw <= n_varw + 1;
      if (west_h_out[3][0] && !p_caseack) n_caseack <= n_caseack + 1;
      for (int k = 0; k < 4; k++)
        if (dut.g_row[2].g_col[0].u_cell.term_out[tout(OUT_E1, k)] && !p_case[k])
          n_case[k] <= n_case[k] + 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N_TOKENS = 24;
  localparam int N_CASES  = 16;
  localparam int N_CALLS  = 20;
  localparam int N_WHILES = 8;
  localparam int N_FVS    = 16;

  int n_call[2], n_body, n_while, n_fv;

  // wait at most n clocks for a pin to reach a level
  task automatic wait_pin(input int row, input int bit_i, input logic lvl, input int which);
    for (int n = 0; n < 100; n++) begin
      logic v;
      v = (which == 0) ? west_h_out[row][bit_i] : (which == 1) ? south_out[3][bit_i] : east_out[5][bit_i];
      if (v == lvl) return;
      @(negedge clk);
    end
  endtask

  task automatic run_callmux();
    for (int i = 0; i < N_CALLS; i++) begin
      int   j;
      logic v;
      j = (i < 2) ? i : int'($urandom_range(0, 1));
      v = 1'($urandom);
      west_in[4][2*j +: 2] = {v, ~v};
      for (int n = 0; n < 100 && west_h_out[4][1:0] == 2'b00; n++) @(negedge clk);
      check(west_h_out[4][1:0] === {v, ~v}, $sformatf("callmux output of input %0d", j));
      check(west_h_out[4][3:2] === 2'b00, "callmux input acknowledge waits for the output acknowledge");
      west_in[4][4] = 1'b1;
      wait_pin(4, 2 + j, 1'b1, 0);
      check(west_h_out[4][2 + j] && !west_h_out[4][3 - j], $sformatf("callmux acknowledges caller %0d only", j));
      if (west_h_out[4][2 + j]) n_call[j]++;
      west_in[4][2*j +: 2] = 2'b00;
      wait_pin(4, 0, 1'b0, 0); wait_pin(4, 1, 1'b0, 0);
      west_in[4][4] = 1'b0;
      wait_pin(4, 2 + j, 1'b0, 0);
      check(west_h_out[4][3:0] === 4'b0000, "callmux returns to zero");
    end
  endtask

  task automatic run_while();
    for (int i = 0; i < N_WHILES; i++) begin
      int trips, bodies;
      trips = i % 4;
      bodies = 0;
      west_in[4][5] = 1'b1;
      for (int g = 0; g <= trips; g++) begin
        wait_pin(5, 1, 1'b1, 0);
        check(west_h_out[5][1], "while fetches its guard");
        w4_in[1:0] = (g < trips) ? 2'b10 : 2'b01;
        wait_pin(5, 1, 1'b0, 0);
        w4_in[1:0] = 2'b00;
        if (g < trips) begin
          wait_pin(5, 2, 1'b1, 0);
          if (west_h_out[5][2]) bodies++;
          w4_in[2] = 1'b1;
          wait_pin(5, 2, 1'b0, 0);
          w4_in[2] = 1'b0;
        end
      end
      wait_pin(5, 0, 1'b1, 0);
      check(west_h_out[5][0], "while acknowledges after a false guard");
      check(bodies === trips, $sformatf("while ran its body %0d times, expected %0d", bodies, trips));
      check(!west_h_out[5][2], "no body request after a false guard");
      n_body += bodies;
      if (west_h_out[5][0]) n_while++;
      west_in[4][5] = 1'b0;
      wait_pin(5, 0, 1'b0, 0);
    end
  endtask

  task automatic run_falsevar();
    for (int i = 0; i < N_FVS; i++) begin
      logic a, b;
      a = 1'($urandom); b = 1'($urandom);
      // the two writes arrive one after the other, in random order
      if (i % 2 == 0) begin
        south_in[3][1:0] = {a, ~a};
        wait_pin(0, 0, 1'b1, 1);
        repeat (3) @(negedge clk);
        check(south_out[3][0] && !south_out[3][2], "join waits for the second write");
        south_in[3][3:2] = {b, ~b};
      end else begin
        south_in[3][3:2] = {b, ~b};
        wait_pin(0, 1, 1'b1, 1);
        repeat (3) @(negedge clk);
        check(south_out[3][1] && !south_out[3][2], "join waits for the second write");
        south_in[3][1:0] = {a, ~a};
      end
      wait_pin(0, 2, 1'b1, 1);
      check(south_out[3][2] && south_out[3][1:0] === 2'b11, "join rises once both writes are held");
      if (south_out[3][2]) n_fv++;
      south_in[3][3:0] = '0;
      wait_pin(0, 2, 1'b0, 1);
      check(!south_out[3][2], "join returns to zero");
      south_in[3][5:4] = 2'b11;
      wait_pin(0, 4, 1'b1, 1); wait_pin(0, 3, 1'b1, 1);
      repeat (2) @(negedge clk);
      check(south_out[3][4:3] === {a, ~a}, "bit 0 read back");
      check(east_out[5][1:0] === {b, ~b}, "bit 1 read back over the right CB");
      south_in[3][5:4] = 2'b00;
      repeat (2) @(negedge clk);
    end
  endtask

  initial begin
    cfg_we = 0; cfg_row = '0; cfg_col = '0; cfg_wdata = '0;
    east_h_in = '0; north_v_in = '0; south_v_in = '0; south_in = '0; west_in = '0;
    run = 0; sel_v = '0; n_cfg = 0; w4_in = '0;
    n_call = '{0, 0}; n_body = 0; n_while = 0; n_fv = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // configuration
    place_and_route();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        cfg_we = 1; cfg_row = ($clog2(ROWS+1))'(r); cfg_col = ($clog2(COLS+1))'(c);
        cfg_wdata = cc[r][c];
        @(negedge clk);
        n_cfg++;
      end
    cfg_we = 0;
    check(dut.g_row[1].g_col[2].u_cell.cfg === cc[1][2], "configuration stored");
    run = 1;
    @(negedge clk);
    // start the counter
    west_in[0][0] = 1'b1;
    // drive Case selectors while the counter runs
    for (int i = 0; i < N_CASES; i++) begin
      sel_v = (i < 4) ? 2'(i) : 2'($urandom);
      west_in[2][1:0] = {sel_v[0], ~sel_v[0]};
      west_in[2][3:2] = {sel_v[1], ~sel_v[1]};
      for (int n = 0; n < 200 && !west_h_out[3][0]; n++) @(negedge clk);
      check(west_h_out[3][0], "case input acknowledged");
      west_in[2][3:0] = '0;
      for (int n = 0; n < 200 && west_h_out[3][0]; n++) @(negedge clk);
      check(!west_h_out[3][0], "case acknowledge returns to zero");
    end
    run_callmux();
    run_while();
    run_falsevar();
    for (int n = 0; n < 20000 && n_out < N_TOKENS; n++) @(negedge clk);
    check(n_out >= N_TOKENS, $sformatf("counter produced %0d outputs", n_out));
    check(n_enc === N_CASES, $sformatf("encode results %0d", n_enc));
    check(n_loop >= N_TOKENS, $sformatf("loop iterations %0d", n_loop));
    check(n_seq >= N_TOKENS - 1, $sformatf("sequence completions %0d", n_seq));
    check(n_concur >= N_TOKENS - 1, $sformatf("concur completions %0d", n_concur));
    check(n_lutw >= N_TOKENS - 1, $sformatf("LUT writes %0d", n_lutw));
    check(n_varw >= N_TOKENS - 1, $sformatf("VarIn writes %0d", n_varw));
    check(n_caseack === N_CASES, $sformatf("case handshakes %0d", n_caseack));
    for (int k = 0; k < 4; k++) check(n_case[k] > 0, $sformatf("case output %0d used", k));
    check(n_cfg === ROWS * COLS, "every cell configured");
    for (int k = 0; k < 2; k++) check(n_call[k] > 0, $sformatf("calls through callmux input %0d", k));
    check(n_body === N_WHILES / 4 * 6, $sformatf("while body runs %0d", n_body));
    check(n_while === N_WHILES, $sformatf("while completions %0d", n_while));
    check(n_fv === N_FVS, $sformatf("C-element joins %0d", n_fv));
    $display("mechanisms: cfg=%0d loop=%0d sequence=%0d concur=%0d lut_writes=%0d var_writes=%0d outputs=%0d case=%0d/%0d/%0d/%0d encode=%0d calls=%0d/%0d while_bodies=%0d whiles=%0d joins=%0d",
             n_cfg, n_loop, n_seq, n_concur, n_lutw, n_varw, n_out,
             n_case[0], n_case[1], n_case[2], n_case[3], n_enc,
             n_call[0], n_call[1], n_body, n_while, n_fv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
