// Intermediate fabric built on the low-overhead virtual interconnect.
//
// An NxM fabric (ROWS x COLS) is a grid of cells: row 0 holds M fabric inputs,
// rows 1..N-2 hold M CUs each and row N-1 holds M fabric outputs.  A switch
// box sits at every cell corner, giving an (N+1)x(M+1) grid of boxes.
// Neighbouring boxes are joined by 2-source tracks.  Because a 2-source track
// has exactly two possible drivers, its mux reduces to two directional wires,
// one each way, so there is no track logic at all: box (r,c)'s S output drives
// box (r+1,c)'s N input and the reverse, and likewise east/west.  There are no
// connection boxes; a cell's I/O is wired straight to its corner boxes:
//   cell (r,c) output   -> box (r,c) SE input and box (r,c+1) SW input
//   cell (r,c) input A  <- box (r+1,c) NE output
//   cell (r,c) input B  <- box (r+1,c+1) NW output
// Inputs at the edge of the grid, where no neighbour exists, are tied to 0.
// Edge boxes keep their full configuration slices so that the bitfile layout
// is uniform.
//
// The configuration of all boxes and cells is one shift chain (cfg_chain),
// layout given by the functions of if_pkg.  The fabric computes while it is
// being configured; results are only meaningful after a complete load.
//
// Timing: each switch-box hop costs one cycle, each CU one cycle plus its
// realignment delay; input and output cells add no delay.
// The cell placement rule above and the I/O cells' connections are read from
// the presented layout drawing; grid edges, the chain and the track-to-track
// mapping inside the boxes are this design's choices.
module fabric
  import if_pkg::*;
#(
  parameter int unsigned ROWS     = FAB_ROWS,
  parameter int unsigned COLS     = FAB_COLS,
  parameter int unsigned DATA_W   = FAB_DATA_W,
  parameter int unsigned H_TRACKS = FAB_H_TRACKS,
  parameter int unsigned V_TRACKS = FAB_V_TRACKS,
  localparam int unsigned SB_W    = sb_cfg_bits(H_TRACKS, V_TRACKS),
  localparam int unsigned CFG_BITS = fab_cfg_bits(ROWS, COLS, H_TRACKS, V_TRACKS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_shift_en,
  input  logic                        cfg_in,
  output logic                        cfg_out,
  input  logic [COLS-1:0][DATA_W-1:0] fab_in,
  output logic [COLS-1:0][DATA_W-1:0] fab_out
);

  // ------------------------------------------------------ configuration
  logic [CFG_BITS-1:0] cfg;

  cfg_chain #(.LEN(CFG_BITS)) u_cfg (
    .clk, .rst_n, .shift_en(cfg_shift_en), .cfg_in, .cfg_out, .cfg);

  // ------------------------------------------------------ box signals
  typedef logic [V_TRACKS-1:0][DATA_W-1:0] vbus_t;
  typedef logic [H_TRACKS-1:0][DATA_W-1:0] hbus_t;

  vbus_t              n_in  [ROWS+1][COLS+1], s_in  [ROWS+1][COLS+1];
  vbus_t              n_out [ROWS+1][COLS+1], s_out [ROWS+1][COLS+1];
  hbus_t              w_in  [ROWS+1][COLS+1], e_in  [ROWS+1][COLS+1];
  hbus_t              w_out [ROWS+1][COLS+1], e_out [ROWS+1][COLS+1];
  logic [DATA_W-1:0]  sw_in [ROWS+1][COLS+1], se_in [ROWS+1][COLS+1];
  logic [DATA_W-1:0]  nw_out[ROWS+1][COLS+1], ne_out[ROWS+1][COLS+1];

  // cell outputs; the output row drives nothing into the fabric
  logic [DATA_W-1:0]  cell_y [ROWS][COLS];

  for (genvar r = 0; r <= ROWS; r++) begin : g_sb_r
    for (genvar c = 0; c <= COLS; c++) begin : g_sb_c
      // tracks: pairs of directional wires between neighbouring boxes
      assign n_in[r][c] = (r > 0)    ? s_out[(r > 0) ? r-1 : 0][c] : '0;
      assign s_in[r][c] = (r < ROWS) ? n_out[(r < ROWS) ? r+1 : r][c] : '0;
      assign w_in[r][c] = (c > 0)    ? e_out[r][(c > 0) ? c-1 : 0] : '0;
      assign e_in[r][c] = (c < COLS) ? w_out[r][(c < COLS) ? c+1 : c] : '0;
      // CU channels: outputs of the cells below-left and below-right
      assign sw_in[r][c] = (r < ROWS - 1 && c > 0)    ? cell_y[(r < ROWS) ? r : 0][(c > 0) ? c-1 : 0] : '0;
      assign se_in[r][c] = (r < ROWS - 1 && c < COLS) ? cell_y[(r < ROWS) ? r : 0][(c < COLS) ? c : 0] : '0;

      switch_box #(.DATA_W(DATA_W), .H_TRACKS(H_TRACKS), .V_TRACKS(V_TRACKS)) u_sb (
        .clk, .rst_n,
        .cfg   (cfg[fab_sb_base(r, c, COLS, H_TRACKS, V_TRACKS) +: SB_W]),
        .n_in  (n_in[r][c]),  .s_in (s_in[r][c]),
        .w_in  (w_in[r][c]),  .e_in (e_in[r][c]),
        .sw_in (sw_in[r][c]), .se_in(se_in[r][c]),
        .n_out (n_out[r][c]), .s_out(s_out[r][c]),
        .w_out (w_out[r][c]), .e_out(e_out[r][c]),
        .nw_out(nw_out[r][c]), .ne_out(ne_out[r][c]));
    end
  end

  // ------------------------------------------------------ cells
  for (genvar c = 0; c < COLS; c++) begin : g_cell_c
    // input row
    assign cell_y[0][c] = fab_in[c];

    // CU rows
    for (genvar r = 1; r < ROWS - 1; r++) begin : g_cu
      dsp_cu #(.DATA_W(DATA_W)) u_cu (
        .clk, .rst_n,
        .cfg(cu_cfg_t'(cfg[fab_cu_base(r, c, ROWS, COLS, H_TRACKS, V_TRACKS) +: CU_CFG_W])),
        .a  (ne_out[r+1][c]),
        .b  (nw_out[r+1][c+1]),
        .y  (cell_y[r][c]));
    end

    // output row
    io_output #(.DATA_W(DATA_W)) u_out (
      .sel_b(cfg[fab_out_base(c, ROWS, COLS, H_TRACKS, V_TRACKS)]),
      .a    (ne_out[ROWS][c]),
      .b    (nw_out[ROWS][c+1]),
      .y    (fab_out[c]));
    assign cell_y[ROWS-1][c] = '0;
  end

endmodule
