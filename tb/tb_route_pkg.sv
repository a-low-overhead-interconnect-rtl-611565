// Bitfile builder used by the fabric-level testbenches.
//
// Writes hand-routed circuits into a configuration image, following the
// chain layout of the fabric: switch boxes row-major over the (R+1)x(C+1)
// grid, each slice [N out selects (3 bits each) | S out selects | W out
// selects (2 bits each) | E out selects | NW | NE] from the LSB; then CU slices
// (op 2 bits, dly_a 4 bits, dly_b 4 bits) rows 1..R-2 row-major; then one
// output-select bit per column.  Offsets are derived here from that
// description, not taken from the RTL.
//
// Two circuits are provided, both on the first CU row, for any fabric with
// ROWS >= 3 and COLS >= 3:
//   mode 0: out1 = in0 + in1 (CU(1,0), operand A realigned by 1 cycle)
//           out2 = in2 * in2 (CU(1,2))
//   mode 1: out1 = in0 - in1, out2 = in2 (pass), out0 = in1 via the B channel
// Latencies: out1, out2: ROWS + 5 cycles; out0 (mode 1): ROWS + 2 cycles.
package tb_route_pkg;
  localparam int MAXB = 16384;  // bitfiles up to 16384 bits (fabrics up to about 18x18)
  typedef logic [MAXB-1:0] img_t;

  // select codes
  localparam int N5_SW = 0, N5_W = 1, N5_ST = 2, N5_E = 3, N5_SE = 4;
  localparam int S4_N = 0, S4_H = 1, S4_DIAG = 2, S4_S = 3;

  function automatic int sbw(int h, int v);
    return 6 * v + 4 * h + 4;
  endfunction

  function automatic int sb_base(int r, int c, int cols, int h, int v);
    return (r * (cols + 1) + c) * sbw(h, v);
  endfunction

  function automatic int total_bits(int rows, int cols, int h, int v);
    return (rows + 1) * (cols + 1) * sbw(h, v) + (rows - 2) * cols * 10 + cols;
  endfunction

  function automatic void put(ref img_t img, input int pos, input int width, input int val);
    for (int k = 0; k < width; k++) img[pos + k] = 1'((val >> k) & 1);
  endfunction

  // kind: "n","s","w","e","nw","ne"
  function automatic void set_sb(ref img_t img, input int rows, input int cols, input int h,
                                 input int v, input int r, input int c, input string kind,
                                 input int idx, input int sel);
    int b = sb_base(r, c, cols, h, v);
    case (kind)
      "n":  put(img, b + 3 * idx, 3, sel);
      "s":  put(img, b + 3 * (v + idx), 3, sel);
      "w":  put(img, b + 6 * v + 2 * idx, 2, sel);
      "e":  put(img, b + 6 * v + 2 * (h + idx), 2, sel);
      "nw": put(img, b + 6 * v + 4 * h, 2, sel);
      default: put(img, b + 6 * v + 4 * h + 2, 2, sel);
    endcase
  endfunction

  function automatic void set_cu(ref img_t img, input int rows, input int cols, input int h,
                                 input int v, input int r, input int c, input int op,
                                 input int dly_a, input int dly_b);
    int b = (rows + 1) * (cols + 1) * sbw(h, v) + ((r - 1) * cols + c) * 10;
    put(img, b, 2, op);
    put(img, b + 2, 4, dly_a);
    put(img, b + 6, 4, dly_b);
  endfunction

  function automatic void set_out(ref img_t img, input int rows, input int cols, input int h,
                                  input int v, input int c, input int sel_b);
    int b = (rows + 1) * (cols + 1) * sbw(h, v) + (rows - 2) * cols * 10 + c;
    put(img, b, 1, sel_b);
  endfunction

  function automatic img_t build(int rows, int cols, int h, int v, int mode);
    img_t img;
    for (int k = 0; k < MAXB; k++) img[k] = 1'b0;
    // in0 -> CU(1,0).A : straight down on vertical track 1, 3 hops
    set_sb(img, rows, cols, h, v, 0, 0, "s", 1, N5_SE);
    set_sb(img, rows, cols, h, v, 1, 0, "s", 1, N5_ST);
    set_sb(img, rows, cols, h, v, 2, 0, "ne", 0, S4_N);
    // in1 -> CU(1,0).B : down, west along a row track, down again, 4 hops
    set_sb(img, rows, cols, h, v, 0, 2, "s", 0, N5_SW);
    set_sb(img, rows, cols, h, v, 1, 2, "w", 0, S4_N);
    set_sb(img, rows, cols, h, v, 1, 1, "s", 0, N5_E);
    set_sb(img, rows, cols, h, v, 2, 1, "nw", 0, S4_N);
    // CU(1,0) -> out1 : straight down column 1 on track 1
    set_sb(img, rows, cols, h, v, 1, 1, "s", 1, N5_SW);
    for (int r = 2; r < rows; r++) set_sb(img, rows, cols, h, v, r, 1, "s", 1, N5_ST);
    set_sb(img, rows, cols, h, v, rows, 1, "ne", 0, S4_N);
    set_out(img, rows, cols, h, v, 1, 0);
    // in2 -> CU(1,2).A and .B, 3 hops each
    set_sb(img, rows, cols, h, v, 0, 2, "s", 1, N5_SE);
    set_sb(img, rows, cols, h, v, 1, 2, "s", 1, N5_ST);
    set_sb(img, rows, cols, h, v, 2, 2, "ne", 0, S4_N);
    set_sb(img, rows, cols, h, v, 0, 3, "s", 0, N5_SW);
    set_sb(img, rows, cols, h, v, 1, 3, "s", 0, N5_ST);
    set_sb(img, rows, cols, h, v, 2, 3, "nw", 0, S4_N);
    // CU(1,2) -> out2 : down, west on row track 1, then down column 2
    set_sb(img, rows, cols, h, v, 1, 3, "s", 1, N5_SW);
    set_sb(img, rows, cols, h, v, 2, 3, "w", 1, S4_N);
    set_sb(img, rows, cols, h, v, 2, 2, "s", 1, N5_E);
    for (int r = 3; r < rows; r++) set_sb(img, rows, cols, h, v, r, 2, "s", 1, N5_ST);
    set_sb(img, rows, cols, h, v, rows, 2, "ne", 0, S4_N);
    set_out(img, rows, cols, h, v, 2, 0);
    if (mode == 0) begin
      set_cu(img, rows, cols, h, v, 1, 0, 0, 1, 0);   // add, realign A by 1
      set_cu(img, rows, cols, h, v, 1, 2, 2, 0, 0);   // multiply
    end else begin
      set_cu(img, rows, cols, h, v, 1, 0, 1, 1, 0);   // subtract
      set_cu(img, rows, cols, h, v, 1, 2, 3, 0, 0);   // pass A
      // in1 continues straight down column 1 on track 0 to out0's B channel
      for (int r = 2; r < rows; r++) set_sb(img, rows, cols, h, v, r, 1, "s", 0, N5_ST);
      set_sb(img, rows, cols, h, v, rows, 1, "nw", 0, S4_N);
      set_out(img, rows, cols, h, v, 0, 1);
    end
    return img;
  endfunction

  // Inner-product kernel (the matrix-multiply workload at vector length 2):
  //   out2 = in0*in1 + in2*in3
  // CU(1,0) = in0*in1, CU(1,2) = in2*in3, CU(2,1) adds the two products.
  // Needs ROWS >= 4 and COLS >= 4.  Latency: 3 hops + CU + 3 hops + CU +
  // (ROWS - 1) hops = ROWS + 7 cycles.
  function automatic img_t build_dot(int rows, int cols, int h, int v);
    img_t img;
    for (int k = 0; k < MAXB; k++) img[k] = 1'b0;
    // operands of CU(1,0) and CU(1,2): straight down, 3 hops each
    set_sb(img, rows, cols, h, v, 0, 0, "s", 1, N5_SE);
    set_sb(img, rows, cols, h, v, 1, 0, "s", 1, N5_ST);
    set_sb(img, rows, cols, h, v, 2, 0, "ne", 0, S4_N);
    set_sb(img, rows, cols, h, v, 0, 1, "s", 0, N5_SE);
    set_sb(img, rows, cols, h, v, 1, 1, "s", 0, N5_ST);
    set_sb(img, rows, cols, h, v, 2, 1, "nw", 0, S4_N);
    set_sb(img, rows, cols, h, v, 0, 2, "s", 1, N5_SE);
    set_sb(img, rows, cols, h, v, 1, 2, "s", 1, N5_ST);
    set_sb(img, rows, cols, h, v, 2, 2, "ne", 0, S4_N);
    set_sb(img, rows, cols, h, v, 0, 3, "s", 0, N5_SE);
    set_sb(img, rows, cols, h, v, 1, 3, "s", 0, N5_ST);
    set_sb(img, rows, cols, h, v, 2, 3, "nw", 0, S4_N);
    set_cu(img, rows, cols, h, v, 1, 0, 2, 0, 0);
    set_cu(img, rows, cols, h, v, 1, 2, 2, 0, 0);
    // products to CU(2,1), 3 hops each
    set_sb(img, rows, cols, h, v, 1, 1, "s", 1, N5_SW);
    set_sb(img, rows, cols, h, v, 2, 1, "s", 1, N5_ST);
    set_sb(img, rows, cols, h, v, 3, 1, "ne", 0, S4_N);
    set_sb(img, rows, cols, h, v, 1, 2, "s", 0, N5_SE);
    set_sb(img, rows, cols, h, v, 2, 2, "s", 0, N5_ST);
    set_sb(img, rows, cols, h, v, 3, 2, "nw", 0, S4_N);
    set_cu(img, rows, cols, h, v, 2, 1, 0, 0, 0);
    // sum down column 2 to out2
    set_sb(img, rows, cols, h, v, 2, 2, "s", 1, N5_SW);
    for (int r = 3; r < rows; r++) set_sb(img, rows, cols, h, v, r, 2, "s", 1, N5_ST);
    set_sb(img, rows, cols, h, v, rows, 2, "ne", 0, S4_N);
    set_out(img, rows, cols, h, v, 2, 0);
    return img;
  endfunction
endpackage
