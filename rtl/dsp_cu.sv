// Computational unit (CU) of the uniform fabric: a 16-bit DSP resource.
//
// Operand A arrives from the switch box at the CU's lower-left corner (its NE
// output) and operand B from the box at the lower-right corner (its NW
// output).  Each operand first passes a realignment register (realign_delay)
// set by the configuration, then the configured operation is applied and the
// result is registered.  The result leaves through the CU's single output,
// which is wired to the two switch boxes at its upper corners.
//
// Operations (cu_op_e): A+B, A-B, A*B (low DATA_W bits) and pass A.  The
// architecture only says the CUs are 16-bit DSP units mapped onto hard
// multipliers; the operation set, its encoding and the single output register
// are this design's choices.
//
// Timing: result = op(A delayed dly_a, B delayed dly_b), one cycle after the
// (delayed) operands, i.e. latency 1 + dly_a for A.
module dsp_cu
  import if_pkg::*;
#(
  parameter int unsigned DATA_W = FAB_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cu_cfg_t           cfg,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y
);

  logic [DATA_W-1:0] a_al, b_al;
  logic [DATA_W-1:0] res;

  realign_delay #(.DATA_W(DATA_W), .DEPTH(REALIGN_DEPTH)) u_ra (
    .clk, .dly(cfg.dly_a), .din(a), .dout(a_al));
  realign_delay #(.DATA_W(DATA_W), .DEPTH(REALIGN_DEPTH)) u_rb (
    .clk, .dly(cfg.dly_b), .din(b), .dout(b_al));

  logic [2*DATA_W-1:0] prod;
  assign prod = a_al * b_al;

  always_comb begin
    unique case (cfg.op)
      CU_ADD:  res = a_al + b_al;
      CU_SUB:  res = a_al - b_al;
      CU_MUL:  res = prod[DATA_W-1:0];
      default: res = a_al;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= res;
  end

endmodule
