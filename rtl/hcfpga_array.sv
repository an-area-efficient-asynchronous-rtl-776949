// hcfpga_array: the handshake-component FPGA, a ROWS x COLS mesh of cells.
//
// Rows r with r % CPLX_PERIOD == 0 hold complex LBs (Sequence, CallMUX, Case,
// Encode, BinaryFunction, Variable: controllers), the other rows simple LBs
// (BinaryFunction, Variable, C-element: data path), the two-row pattern of the
// architecture's overview figure. Cells are joined by their routing segments,
// switch blocks and the S and W terminals of neighbouring LBs (see
// hcfpga_cell). Wherever a cell has no neighbour the signals become pins:
//   west_h_in/out  [r]  west end of row r's horizontal segment (east/west-going wires)
//   east_h_in/out  [r]  east side of the last switch block of row r
//   north_v_in/out [c]  north side of the switch block of cell (0,c)
//   south_v_in/out [c]  south end of column c's vertical segment
//   north_in/out   [c]  the S-terminal slot of the top CB of column c (no LB above)
//   south_in/out   [c]  S terminal of the LB of cell (ROWS-1,c)
//   west_in        [r]  W input terminal of the LB of cell (r,0)
//   east_out       [r]  W-terminal feed of the right CB of cell (r,COLS-1)
// Configuration: cfg_we writes cfg_wdata into cell (cfg_row, cfg_col), one
// cell per clock; everything else is asynchronous four-phase dual-rail logic,
// emulated here with the sampling clock clk (each state-holding gate is one
// register). The mesh follows the architecture; its size (6 x 4, 12 complex
// and 12 simple cells) is this implementation's choice, as the architecture
// gives none. Each connection block registers the segment wires it sends on,
// so every routing segment delays its wires by one clock and no configuration
// can form a combinational loop.
module hcfpga_array
  import hc_pkg::*;
#(
  parameter int unsigned ROWS        = 6,
  parameter int unsigned COLS        = 4,
  parameter int unsigned CPLX_PERIOD = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cfg_we,
  input  logic [$clog2(ROWS+1)-1:0]    cfg_row,
  input  logic [$clog2(COLS+1)-1:0]    cfg_col,
  input  cell_cfg_t                    cfg_wdata,
  input  logic [ROWS-1:0][NH-1:0]      west_h_in,
  output logic [ROWS-1:0][NH-1:0]      west_h_out,
  input  logic [ROWS-1:0][NH-1:0]      east_h_in,
  output logic [ROWS-1:0][NH-1:0]      east_h_out,
  input  logic [COLS-1:0][NH-1:0]      north_v_in,
  output logic [COLS-1:0][NH-1:0]      north_v_out,
  input  logic [COLS-1:0][NH-1:0]      south_v_in,
  output logic [COLS-1:0][NH-1:0]      south_v_out,
  input  logic [COLS-1:0][TW-1:0]      north_in,
  output logic [COLS-1:0][TW-1:0]      north_out,
  input  logic [COLS-1:0][TW-1:0]      south_in,
  output logic [COLS-1:0][TW-1:0]      south_out,
  input  logic [ROWS-1:0][TW-1:0]      west_in,
  output logic [ROWS-1:0][TW-1:0]      east_out
);
  logic [ROWS-1:0][COLS-1:0][NH-1:0] h_from_w, h_to_w, sb_e_out, sb_e_in;
  logic [ROWS-1:0][COLS-1:0][NH-1:0] sb_n_in, sb_n_out, v_to_s, v_from_s;
  logic [ROWS-1:0][COLS-1:0][TW-1:0] up_s_out, up_s_in, lb_s_out, lb_s_in, lb_w_in, rt_w_in;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      hcfpga_cell #(.COMPLEX(r % CPLX_PERIOD == 0)) u_cell (
        .clk, .rst_n,
        .cfg_we   (cfg_we && 32'(cfg_row) == r && 32'(cfg_col) == c),
        .cfg_wdata,
        .h_from_w (h_from_w[r][c]), .h_to_w  (h_to_w[r][c]),
        .sb_e_out (sb_e_out[r][c]), .sb_e_in (sb_e_in[r][c]),
        .sb_n_in  (sb_n_in[r][c]),  .sb_n_out(sb_n_out[r][c]),
        .v_to_s   (v_to_s[r][c]),   .v_from_s(v_from_s[r][c]),
        .up_s_out (up_s_out[r][c]), .up_s_in (up_s_in[r][c]),
        .lb_s_out (lb_s_out[r][c]), .lb_s_in (lb_s_in[r][c]),
        .lb_w_in  (lb_w_in[r][c]),  .rt_w_in (rt_w_in[r][c])
      );

      // horizontal neighbours
      if (c == 0) begin : g_w
        assign h_from_w[r][c] = west_h_in[r];
        assign west_h_out[r]  = h_to_w[r][c];
        assign lb_w_in[r][c]  = west_in[r];
      end else begin : g_w
        assign h_from_w[r][c] = sb_e_out[r][c-1];
        assign lb_w_in[r][c]  = rt_w_in[r][c-1];
      end
      if (c == COLS - 1) begin : g_e
        assign sb_e_in[r][c]  = east_h_in[r];
        assign east_h_out[r]  = sb_e_out[r][c];
        assign east_out[r]    = rt_w_in[r][c];
      end else begin : g_e
        assign sb_e_in[r][c]  = h_to_w[r][c+1];
      end

      // vertical neighbours
      if (r == 0) begin : g_n
        assign sb_n_in[r][c]  = north_v_in[c];
        assign north_v_out[c] = sb_n_out[r][c];
        assign up_s_out[r][c] = north_in[c];
        assign north_out[c]   = up_s_in[r][c];
      end else begin : g_n
        assign sb_n_in[r][c]  = v_to_s[r-1][c];
        assign up_s_out[r][c] = lb_s_out[r-1][c];
      end
      if (r == ROWS - 1) begin : g_s
        assign v_from_s[r][c] = south_v_in[c];
        assign south_v_out[c] = v_to_s[r][c];
        assign lb_s_in[r][c]  = south_in[c];
        assign south_out[c]   = lb_s_out[r][c];
      end else begin : g_s
        assign v_from_s[r][c] = sb_n_out[r+1][c];
        assign lb_s_in[r][c]  = up_s_in[r+1][c];
      end
    end
  end
endmodule
