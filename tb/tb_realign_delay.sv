// Self-checking testbench for realign_delay: a random stream is fed in and the
// output is compared with a history buffer for every delay setting 0..15.
module tb_realign_delay;
  localparam int DW = 16, DEPTH = 16;
  logic clk = 0;
  logic [3:0] dly;
  logic [DW-1:0] din, dout;
  logic [DW-1:0] hist [64];
  int checks = 0, failures = 0;

  realign_delay #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dly = 0; din = 0;
    for (int d = 0; d < DEPTH; d++) begin
      dly = 4'(d);
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        din = DW'($urandom);
        for (int k = 63; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = din;
        #1;
        if (t >= DEPTH) begin
          checks++;
          if (dout !== hist[d]) begin
            failures++;
            if (failures < 10) $display("FAIL dly=%0d t=%0d got %h exp %h", d, t, dout, hist[d]);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
