// Workload testbench for the uniform fabrics of several sizes: the same two
// hand-routed circuits are loaded and checked on 3x3, 8x8, 12x8 and 16x16
// fabrics (16-bit, 2 row tracks, 4 column tracks), the smallest, a middle,
// the one non-square and the largest of the evaluated sizes.  An NxM fabric
// has N rows (input row, N-2 CU rows, output row) and M columns.
module tb_table1_sizes;
  logic clk = 0, rst_n = 0;
  logic [3:0] done;
  int ck [4], fl [4];

  always #5 clk = ~clk;

  tb_size_runner #(.R(3),  .C(3))  u_3x3   (.clk, .rst_n, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  tb_size_runner #(.R(8),  .C(8))  u_8x8   (.clk, .rst_n, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  tb_size_runner #(.R(12), .C(8))  u_12x8  (.clk, .rst_n, .done(done[2]), .checks(ck[2]), .failures(fl[2]));
  tb_size_runner #(.R(16), .C(16)) u_16x16 (.clk, .rst_n, .done(done[3]), .checks(ck[3]), .failures(fl[3]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ck.sum(), fl.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    for (int i = 0; i < 4; i++) $display("size %0d: checks=%0d failures=%0d", i, ck[i], fl[i]);
    $display("TB_RESULT checks=%0d failures=%0d", ck.sum(), fl.sum());
    $finish;
  end
endmodule
