// Shared types, constants and configuration-layout functions of the
// intermediate fabric (a virtual coarse-grained fabric built from ordinary
// FPGA logic).
//
// The fabric is configured through one long shift chain.  Every switch box and
// every cell owns a fixed slice of that chain; the functions below give the
// width of each slice and its position, so that the RTL and any tool that
// writes bitfiles agree on the layout.  After a full load, chain bit i holds
// the i-th bit that was shifted in (counting from 0), so a bitfile is simply
// the chain image sent LSB first.
//
// Default sizes follow the evaluated uniform fabric: 16-bit tracks and CUs,
// 2 tracks per row channel and 4 per column channel, a 5x5 fabric.  The
// operation set of the CU, the realignment depth encoding and the chain order
// are this design's own choices.
package if_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned FAB_ROWS     = 5;   // rows of cells (input row, CU rows, output row)
  localparam int unsigned FAB_COLS     = 5;   // columns of cells
  localparam int unsigned FAB_DATA_W   = 16;  // track / CU width
  localparam int unsigned FAB_H_TRACKS = 2;   // 2-source tracks per row channel
  localparam int unsigned FAB_V_TRACKS = 4;   // 2-source tracks per column channel
  localparam int unsigned REALIGN_DEPTH = 16; // realignment register length (SRL16)
  localparam int unsigned CFG_WORD_W   = 32;  // bitfile word width in block RAM

  // ------------------------------------------------------- CU operations
  typedef enum logic [1:0] {
    CU_ADD  = 2'd0,
    CU_SUB  = 2'd1,
    CU_MUL  = 2'd2,
    CU_PASS = 2'd3
  } cu_op_e;

  localparam int unsigned DLY_W = $clog2(REALIGN_DEPTH);

  // Configuration of one CU, packed LSB first: op, delay of A, delay of B.
  typedef struct packed {
    logic [DLY_W-1:0] dly_b;
    logic [DLY_W-1:0] dly_a;
    cu_op_e           op;
  } cu_cfg_t;

  localparam int unsigned CU_CFG_W  = $bits(cu_cfg_t);
  localparam int unsigned OUT_CFG_W = 1;   // output cell: 0 = A channel, 1 = B channel

  // ------------------------------------------- switch-box mux select codes
  // Select code = position of the input in the mux's input list.
  // N/S outputs (5 inputs): SW, W, straight (S for N out, N for S out), E, SE
  localparam logic [2:0] SEL5_SW = 3'd0, SEL5_W = 3'd1, SEL5_STRAIGHT = 3'd2,
                         SEL5_E  = 3'd3, SEL5_SE = 3'd4;
  // W/E/NW/NE outputs (4 inputs):
  //   W out : N, E, SE, S      E out : N, W, SW, S
  //   NW out: N, E, SE, S      NE out: N, W, SW, S
  localparam logic [1:0] SEL4_N = 2'd0, SEL4_H = 2'd1, SEL4_DIAG = 2'd2, SEL4_S = 2'd3;

  localparam int unsigned SEL5_W_BITS = 3;
  localparam int unsigned SEL4_W_BITS = 2;

  // Width of one switch box's configuration slice.
  function automatic int unsigned sb_cfg_bits(int unsigned h, int unsigned v);
    return 2 * v * SEL5_W_BITS + 2 * h * SEL4_W_BITS + 2 * SEL4_W_BITS;
  endfunction

  // Offsets of the mux selects inside a switch-box slice (LSB first):
  // N out[0..V-1], S out[0..V-1], W out[0..H-1], E out[0..H-1], NW out, NE out.
  function automatic int unsigned sb_off_n(int unsigned i);
    return i * SEL5_W_BITS;
  endfunction
  function automatic int unsigned sb_off_s(int unsigned v, int unsigned i);
    return (v + i) * SEL5_W_BITS;
  endfunction
  function automatic int unsigned sb_off_w(int unsigned v, int unsigned j);
    return 2 * v * SEL5_W_BITS + j * SEL4_W_BITS;
  endfunction
  function automatic int unsigned sb_off_e(int unsigned h, int unsigned v, int unsigned j);
    return 2 * v * SEL5_W_BITS + (h + j) * SEL4_W_BITS;
  endfunction
  function automatic int unsigned sb_off_nw(int unsigned h, int unsigned v);
    return 2 * v * SEL5_W_BITS + 2 * h * SEL4_W_BITS;
  endfunction
  function automatic int unsigned sb_off_ne(int unsigned h, int unsigned v);
    return 2 * v * SEL5_W_BITS + 2 * h * SEL4_W_BITS + SEL4_W_BITS;
  endfunction

  // ------------------------------------------------ fabric chain layout
  // Chain image, LSB first: switch boxes (row-major over the (R+1)x(C+1)
  // grid), then CU cells (rows 1..R-2, row-major), then output cells.
  // Input cells have no configuration.
  function automatic int unsigned fab_sb_base(int unsigned r, int unsigned c,
                                              int unsigned cols, int unsigned h,
                                              int unsigned v);
    return (r * (cols + 1) + c) * sb_cfg_bits(h, v);
  endfunction

  function automatic int unsigned fab_cu_base(int unsigned r, int unsigned c,
                                              int unsigned rows, int unsigned cols,
                                              int unsigned h, int unsigned v);
    return (rows + 1) * (cols + 1) * sb_cfg_bits(h, v) + ((r - 1) * cols + c) * CU_CFG_W;
  endfunction

  function automatic int unsigned fab_out_base(int unsigned c, int unsigned rows,
                                               int unsigned cols, int unsigned h,
                                               int unsigned v);
    return (rows + 1) * (cols + 1) * sb_cfg_bits(h, v) + (rows - 2) * cols * CU_CFG_W
           + c * OUT_CFG_W;
  endfunction

  function automatic int unsigned fab_cfg_bits(int unsigned rows, int unsigned cols,
                                               int unsigned h, int unsigned v);
    return (rows + 1) * (cols + 1) * sb_cfg_bits(h, v) + (rows - 2) * cols * CU_CFG_W
           + cols * OUT_CFG_W;
  endfunction

endpackage
