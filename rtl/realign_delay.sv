// Realignment register placed in front of a CU input.
//
// Routes to the two operands of a CU generally pass through different numbers
// of registered switch boxes.  Instead of a pipelined router, the placer and
// router leave the difference to this block: a configurable delay of
// 0..DEPTH-1 cycles (DEPTH = 16 by default, the length of an SRL16 shift
// register, which is how such registers map onto Xilinx parts).
//
// Implementation: a free-running shift register of DEPTH-1 stages and a tap
// mux.  dly = 0 passes din straight through (combinational), dly = k returns
// din from k cycles earlier.  The shift register has no reset, like an SRL16;
// stale contents drain out within DEPTH-1 cycles.  The tap encoding is this
// design's choice.
module realign_delay #(
  parameter int unsigned DATA_W = if_pkg::FAB_DATA_W,
  parameter int unsigned DEPTH  = if_pkg::REALIGN_DEPTH,
  localparam int unsigned DLY_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [DLY_W-1:0]  dly,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DEPTH-2:0][DATA_W-1:0] sr;   // sr[k] = din delayed by k+1 cycles

  always_ff @(posedge clk) begin
    sr[0] <= din;
    for (int k = 1; k < DEPTH - 1; k++) sr[k] <= sr[k-1];
  end

  always_comb begin
    if (dly == '0) dout = din;
    else           dout = sr[32'(dly) - 1];
  end

endmodule
