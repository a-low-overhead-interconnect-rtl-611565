// Self-checking testbench for programmer: a behavioural RAM with one-cycle
// read latency holds a random bitfile; the bits the programmer shifts out are
// collected and compared with the bitfile, and the number of cycles from start
// to done (CFG_BITS + 2) and the back-to-back shifting are checked.  Two loads
// are made, the second with a different bitfile.
module tb_programmer;
  localparam int BITS = 100, W = 32, NW = (BITS + W - 1) / W, AW = $clog2(NW);
  logic clk = 0, rst_n = 0, start = 0, busy, done, re, shift_en, cfg_bit;
  logic [AW-1:0] raddr;
  logic [W-1:0] rdata;
  logic [W-1:0] mem [NW];
  logic [BITS-1:0] got;
  int nshift, checks = 0, failures = 0;

  programmer #(.CFG_BITS(BITS), .WORD_W(W)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rdata <= '0;
    else if (re) rdata <= mem[raddr];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_start, t_done, t_first, t_last, cyc;

    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < NW; i++) mem[i] = $urandom;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1; nshift = 0; t_first = -1; t_last = -1;
      while (!done) begin
        if (shift_en) begin
          if (nshift < BITS) got[nshift] = cfg_bit;
          if (t_first < 0) t_first = cyc;
          t_last = cyc;
          nshift++;
        end
        @(negedge clk); cyc++;
      end
      checks++;
      if (nshift != BITS) begin failures++; $display("FAIL shifted %0d bits", nshift); end
      for (int k = 0; k < BITS; k++) begin
        checks++;
        if (got[k] !== mem[k / W][k % W]) failures++;
      end
      checks++;
      if (cyc != BITS + 2) begin failures++; $display("FAIL start->done %0d cycles", cyc); end
      checks++;
      if (t_last - t_first + 1 != BITS) begin failures++; $display("FAIL shifting not back to back"); end
      checks++; if (busy) failures++;
      repeat (3) @(negedge clk);
      checks++; if (!done || shift_en) failures++;   // done held, no more shifts
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
