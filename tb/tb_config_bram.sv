// Self-checking testbench for config_bram: writes random words, reads them
// back in random order and checks the one-cycle read latency and that rdata
// holds while re is low.
module tb_config_bram;
  localparam int W = 32, D = 46, AW = $clog2(D);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  config_bram #(.WORD_W(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 200; t++) begin
      automatic int a = $urandom_range(0, D - 1);
      @(negedge clk);
      re = 1; raddr = AW'(a);
      @(negedge clk);
      re = 0; raddr = AW'($urandom_range(0, D - 1));
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
      end
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) failures++;   // held while re is low
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
