// Self-checking testbench for cfg_chain: shifts random images of LEN bits in,
// with idle cycles in between, and checks that bit i holds the i-th bit
// shifted in, that the chain holds while shift_en is low and that cfg_out
// returns the old contents in order.
module tb_cfg_chain;
  localparam int LEN = 37;
  logic clk = 0, rst_n = 0, shift_en = 0, cfg_in = 0, cfg_out;
  logic [LEN-1:0] cfg, img, prev;
  int checks = 0, failures = 0;

  cfg_chain #(.LEN(LEN)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (cfg !== '0) failures++;
    rst_n = 1;
    prev = '0;
    for (int rep = 0; rep < 5; rep++) begin
      for (int k = 0; k < LEN; k++) img[k] = 1'($urandom);
      for (int k = 0; k < LEN; k++) begin
        @(negedge clk);
        // the bit leaving now is old bit k
        checks++;
        if (cfg_out !== prev[k]) failures++;
        shift_en = 1; cfg_in = img[k];
        @(negedge clk);
        shift_en = 0;
        if ($urandom_range(0, 1) == 1) @(negedge clk);   // idle gap
      end
      #1;
      checks++;
      if (cfg !== img) begin
        failures++;
        $display("FAIL image %h exp %h", cfg, img);
      end
      repeat (3) @(posedge clk);
      checks++; if (cfg !== img) failures++;   // holds when not shifting
      prev = img;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
