// tb_callmux_module: self-checking test of the CallMUX module.
// Random callers (one at a time) push a random dual-rail bit; a receiver with
// random delay acknowledges. Checks that the value appears on call_out, that
// only the active caller is acknowledged, and that every acknowledge returns
// to zero after the caller's spacer.
module tb_callmux_module;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  dr_t  [3:0] call_in;
  logic [3:0] in_ack;
  dr_t        call_out;
  logic       out_ack;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  callmux_module dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // receiver
  always_ff @(posedge clk)
    if (out_ack != dr_valid(call_out) && $urandom_range(0, 1) == 1) out_ack <= dr_valid(call_out);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   who;
    logic b;
    int   n;
    call_in = '0; out_ack = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      who = $urandom_range(0, 3);
      b   = 1'($urandom);
      @(negedge clk);
      call_in[who] = dr_enc(b);
      #1;
      check(call_out === dr_enc(b), "data forwarded");
      n = 0;
      while (!in_ack[who] && n < 50) begin @(negedge clk); n++; end
      check(in_ack === (4'b0001 << who), $sformatf("only caller %0d acked (%b)", who, in_ack));
      call_in[who] = DR_SPACER;
      n = 0;
      while (in_ack[who] && n < 50) begin @(negedge clk); n++; end
      check(in_ack === '0 && call_out === DR_SPACER, "return to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
