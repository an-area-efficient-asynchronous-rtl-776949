// sequence_module: the Sequence module, the control sequencer of the complex LB.
//
// One passive activation channel (act_req/act_ack) and two active output
// channels (out_req/out_ack[0..1]), all four-phase. The configured mode picks
// the handshake component it implements:
//   SEQ_SEQUENCE  activation -> full handshake on output 0, then on output 1 -> ack
//   SEQ_CONCUR    activation -> both outputs requested together, ack when both acked
//   SEQ_LOOP      activation -> handshakes on output 0 repeated forever, never acked
//   SEQ_WHILE     output 0 fetches a dual-rail guard (guard); while it is 1 a
//                 handshake runs on output 1 and the guard is fetched again; a 0
//                 acknowledges the activation
//   SEQ_FALSEVAR  with the Variable module: when the write acknowledges
//                 var_ready0 (and var_ready1 if fv_two) are high, a handshake on
//                 output 1 (the signal port) runs while the data is held, then
//                 fv_ack rises; it falls when the write acknowledges have fallen
// Outputs 0/1 are the figure's Sequence0/LoopActivateOut and Concur1/Sequence1.req.
// The modes are the handshake components the architecture maps on this
// module; the burst-mode controller inside is this implementation's own, a
// state machine of the sampling clock that emulates the asynchronous circuit.
module sequence_module
  import hc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  seq_mode_e  mode,        // configuration
  input  logic       fv_two,      // configuration
  input  logic       act_req,
  output logic       act_ack,
  output logic [1:0] out_req,
  input  logic [1:0] out_ack,
  input  dr_t        guard,
  input  logic       var_ready0,
  input  logic       var_ready1,
  output logic       fv_ack
);
  typedef enum logic [2:0] {
    ST_IDLE, ST_O0_UP, ST_O0_DN, ST_O1_UP, ST_O1_DN, ST_DONE, ST_RTZ
  } st_e;

  st_e  st;
  logic g;
  logic written, cleared;

  assign written = var_ready0 & (var_ready1 | ~fv_two);
  assign cleared = ~var_ready0 & (~var_ready1 | ~fv_two);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= ST_IDLE;
      act_ack <= 1'b0;
      out_req <= 2'b00;
      fv_ack  <= 1'b0;
      g       <= 1'b0;
    end else begin
      unique case (mode)
        SEQ_SEQUENCE, SEQ_LOOP: begin
          unique case (st)
            ST_IDLE:  if (act_req) begin out_req[0] <= 1'b1; st <= ST_O0_UP; end
            ST_O0_UP: if (out_ack[0]) begin out_req[0] <= 1'b0; st <= ST_O0_DN; end
            ST_O0_DN: if (!out_ack[0]) begin
                        if (mode == SEQ_LOOP) begin out_req[0] <= 1'b1; st <= ST_O0_UP; end
                        else begin out_req[1] <= 1'b1; st <= ST_O1_UP; end
                      end
            ST_O1_UP: if (out_ack[1]) begin out_req[1] <= 1'b0; st <= ST_O1_DN; end
            ST_O1_DN: if (!out_ack[1]) begin act_ack <= 1'b1; st <= ST_DONE; end
            ST_DONE:  if (!act_req) begin act_ack <= 1'b0; st <= ST_IDLE; end
            default:  st <= ST_IDLE;
          endcase
        end
        SEQ_CONCUR: begin
          unique case (st)
            ST_IDLE:  if (act_req) begin out_req <= 2'b11; st <= ST_O0_UP; end
            ST_O0_UP: if (&out_ack) begin act_ack <= 1'b1; st <= ST_DONE; end
            ST_DONE:  if (!act_req) begin out_req <= 2'b00; st <= ST_RTZ; end
            ST_RTZ:   if (~|out_ack) begin act_ack <= 1'b0; st <= ST_IDLE; end
            default:  st <= ST_IDLE;
          endcase
        end
        SEQ_WHILE: begin
          unique case (st)
            ST_IDLE:  if (act_req) begin out_req[0] <= 1'b1; st <= ST_O0_UP; end
            ST_O0_UP: if (dr_valid(guard)) begin g <= guard.t; out_req[0] <= 1'b0; st <= ST_O0_DN; end
            ST_O0_DN: if (!dr_valid(guard)) begin
                        if (g) begin out_req[1] <= 1'b1; st <= ST_O1_UP; end
                        else begin act_ack <= 1'b1; st <= ST_DONE; end
                      end
            ST_O1_UP: if (out_ack[1]) begin out_req[1] <= 1'b0; st <= ST_O1_DN; end
            ST_O1_DN: if (!out_ack[1]) begin out_req[0] <= 1'b1; st <= ST_O0_UP; end
            ST_DONE:  if (!act_req) begin act_ack <= 1'b0; st <= ST_IDLE; end
            default:  st <= ST_IDLE;
          endcase
        end
        SEQ_FALSEVAR: begin
          unique case (st)
            ST_IDLE:  if (written) begin out_req[1] <= 1'b1; st <= ST_O1_UP; end
            ST_O1_UP: if (out_ack[1]) begin out_req[1] <= 1'b0; st <= ST_O1_DN; end
            ST_O1_DN: if (!out_ack[1]) begin fv_ack <= 1'b1; st <= ST_DONE; end
            ST_DONE:  if (cleared) begin fv_ack <= 1'b0; st <= ST_IDLE; end
            default:  st <= ST_IDLE;
          endcase
        end
        default: begin
          st      <= ST_IDLE;
          act_ack <= 1'b0;
          out_req <= 2'b00;
          fv_ack  <= 1'b0;
        end
      endcase
    end
  end
endmodule
