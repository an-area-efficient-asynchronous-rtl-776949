// tb_sequence_module: self-checking test of the Sequence module in all modes.
// Passive responders with random delays answer both output channels (and the
// While guard). Checks per mode:
//   Sequence: one handshake on output 0, then one on output 1, then the ack
//   Concur:   both requests rise together, ack only after both acks
//   Loop:     output 0 handshakes repeat, activation never acknowledged
//   While:    guard values 1,1,1,0 give three body handshakes, then the ack
//   FalseVariable: signal handshake after the write acks, then fv_ack
module tb_sequence_module;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  seq_mode_e  mode;
  logic       fv_two, act_req, act_ack, var_ready0, var_ready1, fv_ack;
  logic [1:0] out_req, out_ack;
  dr_t        guard;
  int checks = 0, failures = 0;
  int hs0, hs1;                 // completed handshakes per output
  int guard_idx;
  logic [3:0] guard_seq;
  logic       order_bad;

  always #5 clk = ~clk;

  sequence_module dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // responders
  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++)
      if (out_ack[i] != out_req[i] && $urandom_range(0, 1) == 1) begin
        out_ack[i] <= out_req[i];
        if (!out_req[i]) begin
          if (i == 0) hs0 <= hs0 + 1; else hs1 <= hs1 + 1;
        end
      end
    // out 1 must never be requested while out 0 is busy (Sequence, While)
    if (mode == SEQ_SEQUENCE && out_req[1] && (out_req[0] || out_ack[0]))
      order_bad <= 1'b1;
    if (mode == SEQ_WHILE && out_req[1] && (out_req[0] || guard != DR_SPACER))
      order_bad <= 1'b1;
  end

  // While guard responder: output 0 fetches guard_seq[guard_idx]
  always_ff @(posedge clk) begin
    if (out_req[0] && guard == DR_SPACER && mode == SEQ_WHILE)
      guard <= dr_enc(guard_seq[guard_idx]);
    else if (!out_req[0] && guard != DR_SPACER) begin
      guard     <= DR_SPACER;
      guard_idx <= guard_idx + 1;
    end
  end

  task automatic wait_for(input logic expect_ack, input int max_cycles, output logic ok);
    ok = 1'b0;
    for (int c = 0; c < max_cycles; c++) begin
      @(negedge clk);
      if (act_ack == expect_ack) begin ok = 1'b1; break; end
    end
  endtask

  task automatic start(input seq_mode_e m);
    @(negedge clk);
    rst_n = 1'b0; mode = m; act_req = 0; var_ready0 = 0; var_ready1 = 0;
    @(negedge clk);
    rst_n = 1'b1;
    hs0 = 0; hs1 = 0; guard_idx = 0; order_bad = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    mode = SEQ_OFF; fv_two = 0; act_req = 0; var_ready0 = 0; var_ready1 = 0;
    out_ack = '0; guard = DR_SPACER; guard_seq = 4'b0111; guard_idx = 0;
    hs0 = 0; hs1 = 0; order_bad = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int rep = 0; rep < 20; rep++) begin
      // Sequence
      start(SEQ_SEQUENCE);
      act_req = 1;
      wait_for(1'b1, 200, ok);
      check(ok, "sequence acknowledged");
      check(hs0 === 1 && hs1 === 1, $sformatf("sequence handshakes %0d %0d", hs0, hs1));
      check(!order_bad, "sequence order");
      act_req = 0;
      wait_for(1'b0, 50, ok);
      check(ok, "sequence ack returns to zero");

      // Concur
      start(SEQ_CONCUR);
      act_req = 1;
      @(negedge clk); @(negedge clk);
      check(out_req === 2'b11, "concur requests both outputs together");
      wait_for(1'b1, 200, ok);
      check(ok && out_ack === 2'b11, "concur ack after both acks");
      act_req = 0;
      wait_for(1'b0, 200, ok);
      check(ok && out_ack === 2'b00, "concur return to zero after both");

      // Loop
      start(SEQ_LOOP);
      act_req = 1;
      repeat (100) @(negedge clk);
      check(hs0 >= 5 && hs1 === 0, $sformatf("loop repeats output 0 (%0d)", hs0));
      check(!act_ack, "loop never acknowledges");

      // While, guard 1,1,1,0
      start(SEQ_WHILE);
      guard_seq = 4'b0111;
      act_req = 1;
      wait_for(1'b1, 400, ok);
      check(ok, "while terminates on false guard");
      check(hs1 === 3, $sformatf("while body count %0d", hs1));
      check(!order_bad, "while guard/body order");
      act_req = 0;
      wait_for(1'b0, 50, ok);

      // FalseVariable, one and two write acks
      for (int two = 0; two < 2; two++) begin
        start(SEQ_FALSEVAR);
        fv_two = 1'(two);
        var_ready0 = 1;
        repeat (4) @(negedge clk);
        if (two) begin
          check(!out_req[1], "falsevariable waits for both acks");
          var_ready1 = 1;
        end
        for (int c = 0; c < 200 && !fv_ack; c++) @(negedge clk);
        check(fv_ack && hs1 === 1, "falsevariable signal then ack");
        var_ready0 = 0; var_ready1 = 0;
        for (int c = 0; c < 20 && fv_ack; c++) @(negedge clk);
        check(!fv_ack, "falsevariable ack returns to zero");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
