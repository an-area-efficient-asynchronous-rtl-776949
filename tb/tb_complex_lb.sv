// tb_complex_lb: self-checking test of the complex logic block through its terminals.
// Configuration:
//   Sequence (Sequence mode): activate W0, activate ack -> E1 out 0,
//     requests -> E1 out 1,2, their acks <- W1,W2
//   CallMUX: input 1 <- N1 0-1, output -> N2 0-1, its ack <- N1 2,
//     input-1 ack -> N2 2
//   Case: selector <- S 0-3, requests -> S out 0-3, acks <- S 4,5 and E1 0,1,
//     selector ack -> S out 4
//   Encode: requests <- E1 2-5, output -> E2 0-3, its ack <- N1 3,
//     acks of inputs 0..1 -> E2 4,5
//   BinaryFunction and Variable are left unconfigured here; the simple-LB
//     test covers them.
// Passive responders acknowledge every active output with random delays.
// Each module is exercised with full four-phase handshakes and its results
// are compared with the expected values.
module tb_complex_lb;
  import hc_pkg::*;
  import hc_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  lb_cfg_t cfg;
  logic [LB_IN_W-1:0]  term_in, stim, resp;
  logic [LB_OUT_W-1:0] term_out;
  int checks = 0, failures = 0;
  int seq_hs0, seq_hs1;

  always #5 clk = ~clk;

  complex_lb dut (.clk, .rst_n, .cfg, .term_in, .term_out);

  assign term_in = stim | resp;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic dr_t get(int term, int w);
    return '{t: term_out[tout(term, w + 1)], f: term_out[tout(term, w)]};
  endfunction

  task automatic put(int term, int w, dr_t d);
    stim[tin(term, w)]     = d.f;
    stim[tin(term, w + 1)] = d.t;
  endtask

  task automatic wait_out(int idx, logic val);
    for (int n = 0; n < 100 && term_out[idx] != val; n++) @(negedge clk);
  endtask

  // passive responders
  always_ff @(posedge clk) begin
    logic v;
    if (!rst_n) begin
      resp <= '0; seq_hs0 <= 0; seq_hs1 <= 0;
    end else if ($urandom_range(0, 1) == 1) begin
      // Sequence outputs
      if (resp[tin(IN_W, 1)] != term_out[tout(OUT_E1, 1)]) begin
        resp[tin(IN_W, 1)] <= term_out[tout(OUT_E1, 1)];
        if (!term_out[tout(OUT_E1, 1)]) seq_hs0 <= seq_hs0 + 1;
      end
      if (resp[tin(IN_W, 2)] != term_out[tout(OUT_E1, 2)]) begin
        resp[tin(IN_W, 2)] <= term_out[tout(OUT_E1, 2)];
        if (!term_out[tout(OUT_E1, 2)]) seq_hs1 <= seq_hs1 + 1;
      end
      // CallMUX receiver
      resp[tin(IN_N1, 2)] <= dr_valid(get(OUT_N2, 0));
      // Case receivers
      resp[tin(IN_S, 4)]  <= term_out[tout(OUT_S, 0)];
      resp[tin(IN_S, 5)]  <= term_out[tout(OUT_S, 1)];
      resp[tin(IN_E1, 0)] <= term_out[tout(OUT_S, 2)];
      resp[tin(IN_E1, 1)] <= term_out[tout(OUT_S, 3)];
      // Encode receiver
      v = dr_valid(get(OUT_E2, 0)) & dr_valid(get(OUT_E2, 2));
      resp[tin(IN_N1, 3)] <= v;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] v;
    int         who;
    logic       b;
    cfg = '0;
    cfg.seq_mode = SEQ_SEQUENCE;
    route_in (cfg, MI_ACT, IN_W, 0, 1);
    route_in (cfg, MI_SACK0, IN_W, 1, 2);
    route_out(cfg, MO_AACK, OUT_E1, 0, 3);
    route_in (cfg, MI_CALL + 2, IN_N1, 0, 2);
    route_in (cfg, MI_CACK, IN_N1, 2, 1);
    route_out(cfg, MO_COUT, OUT_N2, 0, 2);
    route_out(cfg, MO_CIACK + 1, OUT_N2, 2, 1);
    route_in (cfg, MI_CASE, IN_S, 0, 4);
    route_in (cfg, MI_KACK, IN_S, 4, 2);
    route_in (cfg, MI_KACK + 2, IN_E1, 0, 2);
    route_out(cfg, MO_KREQ, OUT_S, 0, 5);
    route_in (cfg, MI_ENC, IN_E1, 2, 4);
    route_in (cfg, MI_EACK, IN_N1, 3, 1);
    route_out(cfg, MO_EOUT, OUT_E2, 0, 6);
    stim = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) begin
      // Sequence
      stim[tin(IN_W, 0)] = 1'b1;
      wait_out(tout(OUT_E1, 0), 1'b1);
      check(term_out[tout(OUT_E1, 0)] && seq_hs0 === i + 1 && seq_hs1 === i + 1,
            $sformatf("sequence done (%0d,%0d)", seq_hs0, seq_hs1));
      stim[tin(IN_W, 0)] = 1'b0;
      wait_out(tout(OUT_E1, 0), 1'b0);
      check(!term_out[tout(OUT_E1, 0)], "sequence ack returns to zero");

      // CallMUX input 1
      b = 1'($urandom);
      put(IN_N1, 0, dr_enc(b));
      #1 check(get(OUT_N2, 0) === dr_enc(b), "callmux forwards data");
      wait_out(tout(OUT_N2, 2), 1'b1);
      check(term_out[tout(OUT_N2, 2)], "callmux acknowledges input 1");
      put(IN_N1, 0, DR_SPACER);
      wait_out(tout(OUT_N2, 2), 1'b0);
      check(!term_out[tout(OUT_N2, 2)], "callmux ack returns to zero");

      // Case
      v = 2'($urandom);
      put(IN_S, 0, dr_enc(v[0]));
      put(IN_S, 2, dr_enc(v[1]));
      wait_out(tout(OUT_S, 4), 1'b1);
      check(term_out[tout(OUT_S, 4)] && term_out[tout(OUT_S, 0) +: 4] === (4'b0001 << v),
            $sformatf("case selects output %0d", v));
      put(IN_S, 0, DR_SPACER);
      put(IN_S, 2, DR_SPACER);
      wait_out(tout(OUT_S, 4), 1'b0);
      check(term_out[tout(OUT_S, 0) +: 5] === '0, "case returns to zero");

      // Encode
      who = $urandom_range(0, 1);
      stim[tin(IN_E1, 2 + who)] = 1'b1;
      #1 check(get(OUT_E2, 0) === dr_enc(who[0]) && get(OUT_E2, 2) === dr_enc(1'b0),
               "encode index");
      wait_out(tout(OUT_E2, 4 + who), 1'b1);
      check(term_out[tout(OUT_E2, 4 + who)], "encode acknowledges its input");
      stim[tin(IN_E1, 2 + who)] = 1'b0;
      wait_out(tout(OUT_E2, 4 + who), 1'b0);
      check(!term_out[tout(OUT_E2, 4 + who)], "encode ack returns to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
