// Helper for tb_table1_sizes: one if_top of the given size, loaded with the
// two hand-routed circuits of tb_route_pkg in turn, each checked for 100
// cycles at its route latency (ROWS + 5 for out1/out2, ROWS + 2 for out0).
// Reports its counts and raises done when finished.
module tb_size_runner #(
  parameter int R = 3,
  parameter int C = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import tb_route_pkg::*;
  localparam int DW = 16, H = 2, V = 4;
  localparam int T = total_bits(R, C, H, V);
  localparam int NW = (T + 31) / 32;
  localparam int AW = (NW > 1) ? $clog2(NW) : 1;

  logic bf_we = 0;
  logic [AW-1:0] bf_addr = '0;
  logic [31:0] bf_wdata = '0;
  logic cfg_start = 0, cfg_busy, cfg_done;
  logic [C-1:0][DW-1:0] fab_in, fab_out;
  logic [DW-1:0] hist [64][C];

  if_top #(.ROWS(R), .COLS(C), .DATA_W(DW), .H_TRACKS(H), .V_TRACKS(V)) dut (.*);

  task automatic chk(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 5) $display("FAIL %0dx%0d %s got %h exp %h", R, C, what, got, exp);
    end
  endtask

  task automatic load(img_t img);
    int cyc;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      bf_we = 1; bf_addr = AW'(w); bf_wdata = img[32 * w +: 32];
    end
    @(negedge clk); bf_we = 0; cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    cyc = 1;
    while (!cfg_done) begin @(negedge clk); cyc++; end
    chk("load cycles", 16'(cyc), 16'(T + 2));
  endtask

  task automatic run(int mode);
    int lat = R + 5;
    for (int t = 0; t < 100 + lat; t++) begin
      @(negedge clk);
      for (int c = 0; c < C; c++) fab_in[c] = DW'($urandom);
      for (int k = 63; k > 0; k--) hist[k] = hist[k-1];
      for (int c = 0; c < C; c++) hist[0][c] = fab_in[c];
      @(posedge clk); #1;
      if (t > lat + 2) begin
        if (mode == 0) begin
          chk("add", fab_out[1], hist[lat - 1][0] + hist[lat - 1][1]);
          chk("mul", fab_out[2], DW'(32'(hist[lat - 1][2]) * 32'(hist[lat - 1][2])));
        end else begin
          chk("sub", fab_out[1], hist[lat - 1][0] - hist[lat - 1][1]);
          chk("pass", fab_out[2], hist[lat - 1][2]);
          chk("out0", fab_out[0], hist[R + 1][1]);
        end
      end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    fab_in = '0;
    @(posedge rst_n);
    load(build(R, C, H, V, 0));
    run(0);
    load(build(R, C, H, V, 1));
    run(1);
    done = 1;
  end
endmodule
