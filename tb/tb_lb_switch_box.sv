// tb_lb_switch_box: self-checking test of the logic-block crossbar.
// Random selections and inputs, compared with a reference lookup
// (sel 0 = low, sel j = input j-1).
module tb_lb_switch_box;
  localparam int unsigned N_IN = 24, N_OUT = 37, SW = 5;
  logic [N_OUT-1:0][SW-1:0] sel;
  logic [N_IN-1:0]          in;
  logic [N_OUT-1:0]         out;
  int checks = 0, failures = 0;

  lb_switch_box #(.N_IN(N_IN), .N_OUT(N_OUT), .SW(SW)) dut (.sel, .in, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < N_OUT; k++) sel[k] = SW'($urandom_range(0, N_IN));
      in = N_IN'($urandom);
      #1;
      for (int k = 0; k < N_OUT; k++) begin
        checks++;
        if (out[k] !== (sel[k] == 0 ? 1'b0 : in[sel[k] - 1])) begin
          failures++;
          $display("FAIL out[%0d] sel=%0d", k, sel[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
