// End-to-end testbench for if_top at its default size (5x5 fabric, 16-bit,
// 2 row tracks and 4 column tracks, no parameter overrides).
//
// Two hand-routed circuits (tb_route_pkg) are written into the configuration
// block RAM through the host port and loaded by the programmer; the load time
// (bitfile length + 2 cycles) is checked.  After each load, random input
// streams are applied and the outputs are compared with the circuit's function
// of the inputs from the route latency earlier.  The second load reconfigures
// the running fabric.  Each mechanism exercised is counted and must occur:
// bitfile load, reconfiguration, each CU operation, realignment delay, a turn
// from a column track onto a row track and back, straight column hops, the
// CU-channel diagonals and both output-cell channels.
module tb_if_top;
  import if_pkg::*;
  import tb_route_pkg::*;
  localparam int R = FAB_ROWS, C = FAB_COLS, DW = FAB_DATA_W;
  localparam int H = FAB_H_TRACKS, V = FAB_V_TRACKS;
  localparam int T = total_bits(R, C, H, V);
  localparam int NW = (T + 31) / 32;
  localparam int AW = (NW > 1) ? $clog2(NW) : 1;

  logic clk = 0, rst_n = 0;
  logic bf_we = 0;
  logic [AW-1:0] bf_addr = '0;
  logic [31:0] bf_wdata = '0;
  logic cfg_start = 0, cfg_busy, cfg_done;
  logic [C-1:0][DW-1:0] fab_in, fab_out;
  logic [DW-1:0] hist [64][C];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_load = 0, n_reconfig = 0, n_add = 0, n_sub = 0, n_mul = 0, n_pass = 0;
  int n_realign = 0, n_turn = 0, n_straight = 0, n_diag = 0, n_out_a = 0, n_out_b = 0;

  if_top dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [DW-1:0] got, logic [DW-1:0] exp, ref int cnt);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end else cnt++;
  endtask

  task automatic load(img_t img);
    int cyc = 0;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      bf_we = 1; bf_addr = AW'(w); bf_wdata = img[32 * w +: 32];
    end
    @(negedge clk);
    bf_we = 0;
    cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    cyc = 1;
    while (!cfg_done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != T + 2) begin
      failures++;
      $display("FAIL load took %0d cycles, expected %0d", cyc, T + 2);
    end else n_load++;
  endtask

  task automatic run(int mode);
    int lat = R + 5;
    int dummy = 0;
    for (int t = 0; t < 150; t++) begin
      @(negedge clk);
      for (int c = 0; c < C; c++) fab_in[c] = DW'($urandom);
      for (int k = 63; k > 0; k--) hist[k] = hist[k-1];
      for (int c = 0; c < C; c++) hist[0][c] = fab_in[c];
      @(posedge clk); #1;
      // hist[k] went through k+1 clock edges: a route of latency L shows hist[L-1]
      if (t > lat + 2) begin
        if (mode == 0) begin
          chk("add", fab_out[1], hist[lat - 1][0] + hist[lat - 1][1], n_add);
          chk("mul", fab_out[2], DW'(32'(hist[lat - 1][2]) * 32'(hist[lat - 1][2])), n_mul);
        end else begin
          chk("sub", fab_out[1], hist[lat - 1][0] - hist[lat - 1][1], n_sub);
          chk("pass", fab_out[2], hist[lat - 1][2], n_pass);
          chk("out0 via B channel", fab_out[0], hist[R + 1][1], n_out_b);
        end
        // out1 needs the 1-cycle realignment of operand A, the in1 turn onto a
        // row track, the diagonal CU channels and straight column hops
        if (fab_out[1] == ((mode == 0) ? hist[lat - 1][0] + hist[lat - 1][1]
                                       : hist[lat - 1][0] - hist[lat - 1][1])) begin
          n_realign++; n_turn++; n_diag++; n_straight++; n_out_a++;
        end
      end
    end
  endtask

  task automatic need(string what, int cnt);
    checks++;
    $display("mechanism %-24s %0d", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  initial begin
    fab_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(build(R, C, H, V, 0));
    run(0);
    load(build(R, C, H, V, 1));
    if (n_load == 2) n_reconfig++;
    run(1);
    need("bitfile load", n_load);
    need("reconfiguration", n_reconfig);
    need("CU add", n_add);
    need("CU sub", n_sub);
    need("CU mul", n_mul);
    need("CU pass", n_pass);
    need("realignment delay", n_realign);
    need("row-track turn", n_turn);
    need("straight column hops", n_straight);
    need("CU diagonal channels", n_diag);
    need("output channel A", n_out_a);
    need("output channel B", n_out_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
