// End-to-end testbench for fabric on a 3x3 grid (one CU row).  Two hand-routed
// circuits (see tb_route_pkg) are shifted into the configuration chain one
// after the other; for each, random input streams are applied and every
// output is compared with the circuit's function of the inputs from exactly
// the route's latency earlier.  Also checks that the chain's tail returns the
// previous bitfile while the new one is shifted in.
module tb_fabric;
  import tb_route_pkg::*;
  localparam int R = 3, C = 3, DW = 16, H = 2, V = 4;
  localparam int T = (R + 1) * (C + 1) * (6 * V + 4 * H + 4) + (R - 2) * C * 10 + C;

  logic clk = 0, rst_n = 0, cfg_shift_en = 0, cfg_in = 0, cfg_out;
  logic [C-1:0][DW-1:0] fab_in, fab_out;
  logic [DW-1:0] hist [32][C];
  int checks = 0, failures = 0;

  fabric #(.ROWS(R), .COLS(C), .DATA_W(DW), .H_TRACKS(H), .V_TRACKS(V)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic load(img_t img, img_t prev);
    for (int k = 0; k < T; k++) begin
      @(negedge clk);
      checks++;
      if (cfg_out !== prev[k]) failures++;
      cfg_shift_en = 1; cfg_in = img[k];
    end
    @(negedge clk);
    cfg_shift_en = 0;
  endtask

  task automatic run(int mode);
    int lat = R + 5;
    for (int t = 0; t < 120; t++) begin
      @(negedge clk);
      for (int c = 0; c < C; c++) fab_in[c] = DW'($urandom);
      for (int k = 31; k > 0; k--) hist[k] = hist[k-1];
      for (int c = 0; c < C; c++) hist[0][c] = fab_in[c];
      @(posedge clk); #1;
      // hist[k] went through k+1 clock edges, so a route of latency L shows hist[L-1]
      if (t > lat + 2) begin
        if (mode == 0) begin
          chk("add", fab_out[1], hist[lat - 1][0] + hist[lat - 1][1]);
          chk("mul", fab_out[2], DW'(32'(hist[lat - 1][2]) * 32'(hist[lat - 1][2])));
        end else begin
          chk("sub", fab_out[1], hist[lat - 1][0] - hist[lat - 1][1]);
          chk("pass", fab_out[2], hist[lat - 1][2]);
          chk("out0 B channel", fab_out[0], hist[R + 1][1]);
        end
      end
    end
  endtask

  initial begin
    img_t i0, i1;
    fab_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    i0 = build(R, C, H, V, 0);
    i1 = build(R, C, H, V, 1);
    load(i0, '0);
    run(0);
    load(i1, i0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
