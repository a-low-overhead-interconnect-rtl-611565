// Output cell of the fabric's output row.
//
// An output cell takes the place of a CU in the last row of the fabric.  Like
// a CU it is reached by two channels, from the switch boxes at its lower-left
// (NE output) and lower-right (NW output) corners; one configuration bit picks
// which of the two drives the fabric output.  The architecture only says that the
// last row of an NxM fabric holds M outputs; the two-channel select is this
// design's choice, made so that an output is reachable from either corner.
// Purely combinational: the switch-box output registers already time it.
module io_output #(
  parameter int unsigned DATA_W = if_pkg::FAB_DATA_W
) (
  input  logic              sel_b,   // 0: channel A, 1: channel B
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y
);

  always_comb y = sel_b ? b : a;

endmodule
