// Self-checking testbench for dsp_cu: every operation with random operands and
// random realignment delays; the registered result is compared with the
// operation applied to the operands from dly_a / dly_b cycles earlier, one
// cycle after the (delayed) operands.
module tb_dsp_cu;
  import if_pkg::*;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  cu_cfg_t cfg;
  logic [DW-1:0] a, b, y;
  logic [DW-1:0] ha [64], hb [64];
  int checks = 0, failures = 0;

  dsp_cu #(.DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [DW-1:0] ref_op(cu_op_e op, logic [DW-1:0] x, logic [DW-1:0] z);
    logic [31:0] p;
    case (op)
      CU_ADD: return x + z;
      CU_SUB: return x - z;
      CU_MUL: begin p = 32'(x) * 32'(z); return p[DW-1:0]; end
      default: return x;
    endcase
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    checks++; if (y !== '0) failures++;
    rst_n = 1;
    for (int o = 0; o < 4; o++) begin
      for (int rep = 0; rep < 4; rep++) begin
        cfg.op    = cu_op_e'(o);
        cfg.dly_a = 4'($urandom_range(0, 15));
        cfg.dly_b = 4'($urandom_range(0, 15));
        for (int t = 0; t < 50; t++) begin
          @(negedge clk);
          // output now holds the result of the operands sampled at the last edge
          if (t >= 18) begin
            checks++;
            if (y !== ref_op(cfg.op, ha[int'(cfg.dly_a)], hb[int'(cfg.dly_b)])) begin
              failures++;
              if (failures < 10) $display("FAIL op=%0d da=%0d db=%0d got %h", o, cfg.dly_a, cfg.dly_b, y);
            end
          end
          a = DW'($urandom); b = DW'($urandom);
          for (int k = 63; k > 0; k--) begin ha[k] = ha[k-1]; hb[k] = hb[k-1]; end
          ha[0] = a; hb[0] = b;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
