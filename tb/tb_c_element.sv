// tb_c_element: self-checking test of the C-element.
// Drives random 3-input patterns and compares the output, one clock later,
// with a reference: rises on all-ones, falls on all-zeros, else holds.
module tb_c_element;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] in;
  logic       out;
  logic       ref_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  c_element #(.N(3)) dut (.clk, .rst_n, .in, .out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in    = '0;
    ref_q = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // bias towards all-ones / all-zeros so both transitions happen often
      case ($urandom_range(0, 3))
        0: in = 3'b111;
        1: in = 3'b000;
        default: in = 3'($urandom);
      endcase
      if (&in) ref_q = 1'b1;
      else if (~|in) ref_q = 1'b0;
      @(negedge clk);
      checks++;
      if (out !== ref_q) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", in, out, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
