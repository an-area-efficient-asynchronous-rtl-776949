// hc_pkg: types and sizes shared by the handshake-component FPGA fabric.
//
// Data travels in four-phase dual-rail (FPDR) code: a bit is a (T,F) wire pair,
// (1,0) is a 1, (0,1) is a 0 and (0,0) is the spacer sent between two values.
// Every logic-block terminal is a bundle of TW single wires; every routing
// segment carries NT single wires, half of them in each direction. The
// configuration of one cell (logic block, its two connection blocks and its
// switch block) is one packed struct, cell_cfg_t. All sizes here are choices
// of this implementation; the architecture fixes only the encoding and the
// terminal names.
package hc_pkg;

  // Dual-rail bit: (t,f) = (1,0) one, (0,1) zero, (0,0) spacer.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};

  function automatic dr_t dr_enc(input logic b);
    return '{t: b, f: ~b};
  endfunction

  function automatic logic dr_valid(input dr_t d);
    return d.t | d.f;
  endfunction

  // Logic-block terminals (Fig. of the LBs): inputs N1, W, S, E1; outputs N1, N2, S, E1, E2.
  localparam int unsigned TW         = 6;            // wires per terminal
  localparam int unsigned LB_IN_W    = 4 * TW;       // N1,W,S,E1 inputs
  localparam int unsigned LB_OUT_W   = 5 * TW;       // N1,N2,S,E1,E2 outputs
  localparam int unsigned NT         = 8;            // wires per routing segment
  localparam int unsigned NH         = NT / 2;       // wires per direction

  // Dual-rail LUT of the BinaryFunction module
  localparam int unsigned LUT_K      = 3;

  // Module-side wire counts of the logic blocks
  localparam int unsigned CLB_MIN    = 37;           // complex LB module inputs
  localparam int unsigned CLB_MOUT   = 29;           // complex LB module outputs
  localparam int unsigned SLB_MIN    = 10;           // simple LB module inputs
  localparam int unsigned SLB_MOUT   = 7;            // simple LB module outputs

  localparam int unsigned ISB_SW     = $clog2(LB_IN_W + 1);
  localparam int unsigned OSB_SW     = $clog2(CLB_MOUT + 1);
  localparam int unsigned CB_DRV_W   = 3 * TW;       // LB output wires a CB can put on a segment
  localparam int unsigned CB_SSW     = $clog2(CB_DRV_W + 1);
  localparam int unsigned CB_TSW     = $clog2(NT + 1);
  localparam int unsigned SB_SW      = $clog2(3 * NH + 1);

  // Sequence module operating modes
  typedef enum logic [2:0] {
    SEQ_OFF      = 3'd0,
    SEQ_SEQUENCE = 3'd1,
    SEQ_CONCUR   = 3'd2,
    SEQ_LOOP     = 3'd3,
    SEQ_WHILE    = 3'd4,
    SEQ_FALSEVAR = 3'd5
  } seq_mode_e;

  typedef struct packed {
    logic [2**LUT_K-1:0]                lut;        // truth table, index {in2,in1,in0}
    logic                               rd0_src;    // read port 0 reads bit 0 (0) or bit 1 (1)
    logic                               rd1_src;    // read port 1 reads bit 0 (0) or bit 1 (1)
    seq_mode_e                          seq_mode;
    logic                               fv_two;     // FalseVariable waits for both write acks
    logic                               case_one_bit; // Case selects on one bit (2 outputs)
    logic [CLB_MIN-1:0][ISB_SW-1:0]     isb_sel;    // input switch box, 0 = tied low
    logic [LB_OUT_W-1:0][OSB_SW-1:0]    osb_sel;    // output switch box, 0 = tied low
  } lb_cfg_t;

  typedef struct packed {
    logic [NT-1:0][CB_SSW-1:0]          seg_sel;    // 0 = pass the segment, k = LB wire k-1
    logic [2*TW-1:0][CB_TSW-1:0]        term_sel;   // 0 = tied low, k = segment wire k-1
  } cb_cfg_t;

  typedef struct packed {
    logic [3:0][NH-1:0][SB_SW-1:0]      sel;        // per side and outgoing wire; 0 = tied low
  } sb_cfg_t;

  typedef struct packed {
    lb_cfg_t lb;
    cb_cfg_t cb_up;
    cb_cfg_t cb_rt;
    sb_cfg_t sb;
  } cell_cfg_t;

  // Switch-block sides
  localparam int unsigned SIDE_N = 0;
  localparam int unsigned SIDE_E = 1;
  localparam int unsigned SIDE_S = 2;
  localparam int unsigned SIDE_W = 3;

  // Module input wire indices (complex LB; the simple LB uses 0..SLB_MIN-1).
// A dual-rail bit occupies two adjacent wires, F at the lower index, T above.
  localparam int unsigned MI_LUT   = 0;   // 3 dual-rail operands, 6 wires (t,f of op0 first)
  localparam int unsigned MI_VARIN = 6;   // dual-rail write data of variable bit 1
  localparam int unsigned MI_RD0   = 8;   // read request, read port 0
  localparam int unsigned MI_RD1   = 9;   // read request, read port 1
  localparam int unsigned MI_ACT   = 10;  // Sequence activate request
  localparam int unsigned MI_SACK0 = 11;  // Sequence output 0 acknowledge
  localparam int unsigned MI_SACK1 = 12;  // Sequence output 1 acknowledge
  localparam int unsigned MI_GUARD = 13;  // While guard, dual-rail, 2 wires
  localparam int unsigned MI_CALL  = 15;  // CallMUX inputs, 4 dual-rail, 8 wires
  localparam int unsigned MI_CACK  = 23;  // CallMUX output acknowledge
  localparam int unsigned MI_CASE  = 24;  // Case selector, 2 dual-rail, 4 wires
  localparam int unsigned MI_KACK  = 28;  // Case output acknowledges, 4 wires
  localparam int unsigned MI_ENC   = 32;  // Encode input requests, 4 wires
  localparam int unsigned MI_EACK  = 36;  // Encode output acknowledge

  // Module output wire indices (complex LB)
  localparam int unsigned MO_VOUT0 = 0;   // read port 0 data, 2 wires
  localparam int unsigned MO_VOUT1 = 2;   // read port 1 data, 2 wires
  localparam int unsigned MO_VRDY0 = 4;   // write acknowledge of bit 0
  localparam int unsigned MO_VRDY1 = 5;   // write acknowledge of bit 1
  localparam int unsigned MO_SFVA  = 6;   // simple LB only: C-element FalseVariable ack
  localparam int unsigned MO_AACK  = 6;   // complex LB: Sequence activate acknowledge
  localparam int unsigned MO_SREQ0 = 7;   // Sequence output 0 request
  localparam int unsigned MO_SREQ1 = 8;   // Sequence output 1 request
  localparam int unsigned MO_FVACK = 9;   // Sequence FalseVariable acknowledge
  localparam int unsigned MO_COUT  = 10;  // CallMUX output data, 2 wires
  localparam int unsigned MO_CIACK = 12;  // CallMUX input acknowledges, 4 wires
  localparam int unsigned MO_KREQ  = 16;  // Case output requests, 4 wires
  localparam int unsigned MO_KIACK = 20;  // Case input acknowledge
  localparam int unsigned MO_EOUT  = 21;  // Encode output, 2 dual-rail, 4 wires
  localparam int unsigned MO_EIACK = 25;  // Encode input acknowledges, 4 wires

endpackage
