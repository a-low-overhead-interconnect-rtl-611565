// Block RAM that holds the fabric's configuration bitfile.
//
// Simple dual-port memory: a write port for whoever supplies the bitfile and a
// synchronous read port (one cycle latency) for the programmer.  Word i holds
// bitfile bits [i*WORD_W +: WORD_W], LSB first.  The architecture keeps the
// bitfile in a block RAM on the FPGA; the word width and port
// arrangement are this design's choices.  The array is not reset, as in a
// real block RAM.
module config_bram #(
  parameter int unsigned WORD_W = if_pkg::CFG_WORD_W,
  parameter int unsigned DEPTH  = 64,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
