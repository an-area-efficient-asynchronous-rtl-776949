// tb_encode_module: self-checking test of the Encode module.
// Raises one random request at a time; checks that the output carries its
// index in dual-rail code, that only that input is acknowledged after the
// receiver's acknowledge, and the return to spacer.
module tb_encode_module;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] enc_req, in_ack;
  dr_t  [1:0] enc_out;
  logic       out_ack;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  encode_module dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) begin
    logic v;
    v = dr_valid(enc_out[0]) & dr_valid(enc_out[1]);
    if (out_ack != v && $urandom_range(0, 1) == 1) out_ack <= v;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int who, n;
    enc_req = '0; out_ack = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      who = $urandom_range(0, 3);
      @(negedge clk);
      enc_req[who] = 1'b1;
      #1;
      check(enc_out[0] === dr_enc(who[0]) && enc_out[1] === dr_enc(who[1]),
            $sformatf("index %0d encoded as %b", who, enc_out));
      n = 0;
      while (!in_ack[who] && n < 50) begin @(negedge clk); n++; end
      check(in_ack === (4'b0001 << who) && out_ack, "selected input acknowledged");
      enc_req = '0;
      #1;
      check(enc_out === '0, "spacer after request falls");
      n = 0;
      while (in_ack != '0 && n < 50) begin @(negedge clk); n++; end
      check(in_ack === '0, "acknowledge returns to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
