// Self-checking testbench for io_output: random channel values with both
// settings of the select bit.
module tb_io_output;
  localparam int DW = 16;
  logic sel_b;
  logic [DW-1:0] a, b, y;
  int checks = 0, failures = 0;

  io_output #(.DATA_W(DW)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      sel_b = 1'($urandom); a = DW'($urandom); b = DW'($urandom);
      #1;
      checks++;
      if (y !== (sel_b ? b : a)) begin
        failures++;
        $display("FAIL sel_b=%0d a=%h b=%h y=%h", sel_b, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
