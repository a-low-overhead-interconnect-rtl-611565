// Workload testbench: the kernel of the matrix-multiply application, an inner
// product, mapped onto the default 5x5 fabric (16-bit fixed point).  The
// application multiplies two 8-element vectors with 8 multipliers and 7
// adders; a 5x5 fabric has only 5 inputs, so the kernel is run at vector
// length 2: out2 = in0*in1 + in2*in3, two multiplier CUs feeding an adder CU
// in the next CU row.  The bitfile is loaded through the block RAM and the
// programmer, then a random stream is checked at one result per cycle with a
// latency of ROWS + 7 cycles.
module tb_matmul_kernel;
  import if_pkg::*;
  import tb_route_pkg::*;
  localparam int R = FAB_ROWS, C = FAB_COLS, DW = FAB_DATA_W;
  localparam int H = FAB_H_TRACKS, V = FAB_V_TRACKS;
  localparam int T = total_bits(R, C, H, V);
  localparam int NW = (T + 31) / 32;
  localparam int AW = (NW > 1) ? $clog2(NW) : 1;
  localparam int LAT = R + 7;

  logic clk = 0, rst_n = 0;
  logic bf_we = 0;
  logic [AW-1:0] bf_addr = '0;
  logic [31:0] bf_wdata = '0;
  logic cfg_start = 0, cfg_busy, cfg_done;
  logic [C-1:0][DW-1:0] fab_in, fab_out;
  logic [DW-1:0] hist [64][C];
  int checks = 0, failures = 0;

  if_top dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img_t img;
    logic [DW-1:0] exp_y;
    fab_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    img = build_dot(R, C, H, V);
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      bf_we = 1; bf_addr = AW'(w); bf_wdata = img[32 * w +: 32];
    end
    @(negedge clk); bf_we = 0; cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    while (!cfg_done) @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int c = 0; c < C; c++) fab_in[c] = DW'($urandom);
      for (int k = 63; k > 0; k--) hist[k] = hist[k-1];
      for (int c = 0; c < C; c++) hist[0][c] = fab_in[c];
      @(posedge clk); #1;
      if (t > LAT + 2) begin
        exp_y = DW'(32'(hist[LAT-1][0]) * 32'(hist[LAT-1][1]))
              + DW'(32'(hist[LAT-1][2]) * 32'(hist[LAT-1][3]));
        checks++;
        if (fab_out[2] !== exp_y) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, fab_out[2], exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
