// tb_case_module: self-checking test of the Case module.
// Pushes random 2-bit selectors (and 1-bit ones with one_bit set); checks that
// exactly the selected output is requested, that in_ack rises only after that
// output's acknowledge, and the return-to-zero of every signal.
module tb_case_module;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic       one_bit, in_ack;
  dr_t  [1:0] case_in;
  logic [3:0] out_req, out_ack;
  int checks = 0, failures = 0;
  logic early_ack;

  always #5 clk = ~clk;

  case_module dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++)
      if (out_ack[i] != out_req[i] && $urandom_range(0, 2) == 0) out_ack[i] <= out_req[i];
    if (in_ack && out_req != '0 && (out_req & out_ack) == '0) early_ack <= 1'b1;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] v;
    int n;
    case_in = '0; out_ack = '0; one_bit = 0; early_ack = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      one_bit = (i % 4 == 3);
      v = 2'($urandom);
      @(negedge clk);
      case_in[0] = dr_enc(v[0]);
      if (!one_bit) case_in[1] = dr_enc(v[1]);
      else v[1] = 1'b0;
      n = 0;
      while (!in_ack && n < 50) begin @(negedge clk); n++; end
      check(in_ack, "in_ack raised");
      check(out_req === (4'b0001 << v), $sformatf("out_req=%b for v=%0d", out_req, v));
      check(out_ack[v], "ack came from the selected output");
      case_in = '0;
      n = 0;
      while ((in_ack || out_ack != '0) && n < 50) begin @(negedge clk); n++; end
      check(!in_ack && out_req === '0 && out_ack === '0, "return to zero");
    end
    check(!early_ack, "in_ack never ahead of the output acknowledge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
