// Self-checking testbench for switch_box.
// Random track and CU-channel inputs and random mux selects are applied every
// cycle; each registered output is compared one cycle later with a value
// picked from the input lists of the topology (N/S out: SW, W, straight, E,
// SE; W/NW out: N, E, SE, S; E/NE out: N, W, SW, S).  Also checks the
// one-cycle hop latency and that unused 5-input codes give zero.
module tb_switch_box;
  import if_pkg::*;
  localparam int DW = 16, H = 2, V = 4;
  localparam int CW = sb_cfg_bits(H, V);

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] cfg;
  logic [V-1:0][DW-1:0] n_in, s_in, n_out, s_out;
  logic [H-1:0][DW-1:0] w_in, e_in, w_out, e_out;
  logic [DW-1:0] sw_in, se_in, nw_out, ne_out;

  switch_box #(.DATA_W(DW), .H_TRACKS(H), .V_TRACKS(V)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [DW-1:0] pick5(int sel, logic [DW-1:0] a, logic [DW-1:0] b,
                                          logic [DW-1:0] c, logic [DW-1:0] d,
                                          logic [DW-1:0] e);
    case (sel)
      0: return a; 1: return b; 2: return c; 3: return d; 4: return e;
      default: return '0;
    endcase
  endfunction
  function automatic logic [DW-1:0] pick4(int sel, logic [DW-1:0] a, logic [DW-1:0] b,
                                          logic [DW-1:0] c, logic [DW-1:0] d);
    case (sel)
      0: return a; 1: return b; 2: return c; default: return d;
    endcase
  endfunction

  // expected values captured before the clock edge
  logic [V-1:0][DW-1:0] exp_n, exp_s;
  logic [H-1:0][DW-1:0] exp_w, exp_e;
  logic [DW-1:0] exp_nw, exp_ne;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; n_in = '0; s_in = '0; w_in = '0; e_in = '0; sw_in = '0; se_in = '0;
    repeat (2) @(posedge clk);
    chk("reset nw", nw_out, '0);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int k = 0; k < CW; k++) cfg[k] = 1'($urandom);
      for (int i = 0; i < V; i++) begin n_in[i] = DW'($urandom); s_in[i] = DW'($urandom); end
      for (int j = 0; j < H; j++) begin w_in[j] = DW'($urandom); e_in[j] = DW'($urandom); end
      sw_in = DW'($urandom); se_in = DW'($urandom);
      for (int i = 0; i < V; i++) begin
        automatic int sn = int'(cfg[3*i +: 3]);
        automatic int ss = int'(cfg[3*(V+i) +: 3]);
        exp_n[i] = pick5(sn, sw_in, w_in[i%H], s_in[i], e_in[i%H], se_in);
        exp_s[i] = pick5(ss, sw_in, w_in[i%H], n_in[i], e_in[i%H], se_in);
      end
      for (int j = 0; j < H; j++) begin
        automatic int sw = int'(cfg[6*V + 2*j +: 2]);
        automatic int se = int'(cfg[6*V + 2*(H+j) +: 2]);
        exp_w[j] = pick4(sw, n_in[j%V], e_in[j], se_in, s_in[j%V]);
        exp_e[j] = pick4(se, n_in[j%V], w_in[j], sw_in, s_in[j%V]);
      end
      exp_nw = pick4(int'(cfg[6*V + 4*H +: 2]), n_in[0], e_in[0], se_in, s_in[0]);
      exp_ne = pick4(int'(cfg[6*V + 4*H + 2 +: 2]), n_in[1], w_in[1], sw_in, s_in[1]);
      @(posedge clk); #1;
      for (int i = 0; i < V; i++) begin
        chk($sformatf("n_out[%0d]", i), n_out[i], exp_n[i]);
        chk($sformatf("s_out[%0d]", i), s_out[i], exp_s[i]);
      end
      for (int j = 0; j < H; j++) begin
        chk($sformatf("w_out[%0d]", j), w_out[j], exp_w[j]);
        chk($sformatf("e_out[%0d]", j), e_out[j], exp_e[j]);
      end
      chk("nw_out", nw_out, exp_nw);
      chk("ne_out", ne_out, exp_ne);
    end
    // latency: a value entering at W must not appear at E before the edge
    @(negedge clk);
    cfg = '0;
    cfg[6*V + 2*H +: 2] = 2'd1;          // E out[0] <- W[0]
    w_in[0] = 16'hBEEF;
    #1 chk("no combinational path", (e_out[0] == 16'hBEEF) ? 16'd1 : 16'd0, 16'd0);
    @(posedge clk); #1 chk("one-cycle hop", e_out[0], 16'hBEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
