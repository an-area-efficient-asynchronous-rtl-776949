// switch_block: Switch Block (SB), the routing switch at a channel crossing.
//
// Four sides (N, E, S, W in hc_pkg SIDE_* order), each with NH incoming wires
// (in[side]) and NH outgoing wires (out[side]) of the segment on that side.
// Each outgoing wire is driven by one incoming wire of the three other sides
// or tied low: sel[side][k] = 0 ties it low, sel = j (1..3*NH) takes incoming
// wire (j-1) % NH of the (j-1)/NH-th other side, counting clockwise from the
// side after it. Routing wires are single wires; a dual-rail channel uses
// three of them (T and F forward, acknowledge backward). The architecture
// names the block only; the unidirectional wires and full multiplexers are
// this implementation's choice. Combinational.
module switch_block
  import hc_pkg::*;
(
  input  sb_cfg_t                  cfg,
  input  logic [3:0][NH-1:0]       in,
  output logic [3:0][NH-1:0]       out
);
  always_comb begin
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < NH; k++) begin
        out[s][k] = 1'b0;
        for (int o = 0; o < 3; o++)
          for (int j = 0; j < NH; j++)
            if (32'(cfg.sel[s][k]) == o * NH + j + 1) out[s][k] = in[(s + o + 1) % 4][j];
      end
    end
  end
endmodule
