// Virtual switch box of the low-overhead interconnect.
//
// The box sits at a corner shared by up to four cells.  Its four planar
// channels (N, E, S, W) carry the fabric's 2-source tracks, each of which is
// just a pair of opposite directional wires, so a track needs no mux of its
// own.  Two diagonal inputs (SW, SE) take the outputs of the cells below-left
// and below-right; two diagonal outputs (NW, NE) feed an operand input of the
// cells above-left and above-right.  Every output is a configurable mux
// followed by a register, with input lists as in the presented topology:
//   N out / S out (5 inputs): SW, W, straight-through, E, SE
//   W out  (4 inputs): N, E, SE, S        E out  (4 inputs): N, W, SW, S
//   NW out (4 inputs): N, E, SE, S        NE out (4 inputs): N, W, SW, S
// The mux sizes stop at 4 and 5 inputs so that each mux stays on a LUT-count
// plateau of a 4-input-LUT FPGA.
//
// A channel may hold several tracks (H_TRACKS per row channel, V_TRACKS per
// column channel).  Output track i takes track i of the other channels, wrapped
// modulo that channel's track count; NW uses vertical/horizontal track 0 and NE
// track 1 (wrapped), so the two operands of a CU arrive on different tracks.
// This multi-track mapping, the select encoding (code = position in the lists
// above, codes >= 5 on the 5-input muxes give 0) and the reset value 0 are this
// design's choices; the architecture leaves the topology open, to be set per
// application.
//
// Interface: *_in arrive at the named side, *_out leave by it.  cfg is the
// box's slice of the configuration chain (layout in if_pkg).  Timing: one
// register per output, so every hop through a box costs one cycle.
module switch_box
  import if_pkg::*;
#(
  parameter int unsigned DATA_W   = FAB_DATA_W,
  parameter int unsigned H_TRACKS = FAB_H_TRACKS,
  parameter int unsigned V_TRACKS = FAB_V_TRACKS,
  localparam int unsigned CFG_W   = sb_cfg_bits(H_TRACKS, V_TRACKS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [CFG_W-1:0]              cfg,
  input  logic [V_TRACKS-1:0][DATA_W-1:0] n_in,
  input  logic [V_TRACKS-1:0][DATA_W-1:0] s_in,
  input  logic [H_TRACKS-1:0][DATA_W-1:0] w_in,
  input  logic [H_TRACKS-1:0][DATA_W-1:0] e_in,
  input  logic [DATA_W-1:0]             sw_in,
  input  logic [DATA_W-1:0]             se_in,
  output logic [V_TRACKS-1:0][DATA_W-1:0] n_out,
  output logic [V_TRACKS-1:0][DATA_W-1:0] s_out,
  output logic [H_TRACKS-1:0][DATA_W-1:0] w_out,
  output logic [H_TRACKS-1:0][DATA_W-1:0] e_out,
  output logic [DATA_W-1:0]             nw_out,
  output logic [DATA_W-1:0]             ne_out
);

  localparam int unsigned NE_V = 1 % V_TRACKS;
  localparam int unsigned NE_H = 1 % H_TRACKS;

  function automatic logic [DATA_W-1:0] mux5(
      input logic [2:0] sel, input logic [DATA_W-1:0] i0, input logic [DATA_W-1:0] i1,
      input logic [DATA_W-1:0] i2, input logic [DATA_W-1:0] i3, input logic [DATA_W-1:0] i4);
    unique case (sel)
      3'd0:    return i0;
      3'd1:    return i1;
      3'd2:    return i2;
      3'd3:    return i3;
      3'd4:    return i4;
      default: return '0;
    endcase
  endfunction

  function automatic logic [DATA_W-1:0] mux4(
      input logic [1:0] sel, input logic [DATA_W-1:0] i0, input logic [DATA_W-1:0] i1,
      input logic [DATA_W-1:0] i2, input logic [DATA_W-1:0] i3);
    unique case (sel)
      2'd0: return i0;
      2'd1: return i1;
      2'd2: return i2;
      default: return i3;
    endcase
  endfunction

  // vertical-channel outputs
  for (genvar i = 0; i < V_TRACKS; i++) begin : g_v
    localparam int unsigned HI = i % H_TRACKS;
    logic [2:0] sel_n, sel_s;
    assign sel_n = cfg[sb_off_n(i) +: 3];
    assign sel_s = cfg[sb_off_s(V_TRACKS, i) +: 3];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        n_out[i] <= '0;
        s_out[i] <= '0;
      end else begin
        n_out[i] <= mux5(sel_n, sw_in, w_in[HI], s_in[i], e_in[HI], se_in);
        s_out[i] <= mux5(sel_s, sw_in, w_in[HI], n_in[i], e_in[HI], se_in);
      end
    end
  end

  // horizontal-channel outputs
  for (genvar j = 0; j < H_TRACKS; j++) begin : g_h
    localparam int unsigned VI = j % V_TRACKS;
    logic [1:0] sel_w, sel_e;
    assign sel_w = cfg[sb_off_w(V_TRACKS, j) +: 2];
    assign sel_e = cfg[sb_off_e(H_TRACKS, V_TRACKS, j) +: 2];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        w_out[j] <= '0;
        e_out[j] <= '0;
      end else begin
        w_out[j] <= mux4(sel_w, n_in[VI], e_in[j], se_in, s_in[VI]);
        e_out[j] <= mux4(sel_e, n_in[VI], w_in[j], sw_in, s_in[VI]);
      end
    end
  end

  // diagonal CU-channel outputs
  logic [1:0] sel_nw, sel_ne;
  assign sel_nw = cfg[sb_off_nw(H_TRACKS, V_TRACKS) +: 2];
  assign sel_ne = cfg[sb_off_ne(H_TRACKS, V_TRACKS) +: 2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nw_out <= '0;
      ne_out <= '0;
    end else begin
      nw_out <= mux4(sel_nw, n_in[0], e_in[0], se_in, s_in[0]);
      ne_out <= mux4(sel_ne, n_in[NE_V], w_in[NE_H], sw_in, s_in[NE_V]);
    end
  end

endmodule
