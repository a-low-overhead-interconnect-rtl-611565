// Top level: an intermediate fabric together with its configuration store.
//
// A configuration bitfile, produced by the fabric's place-and-route tool, is
// written word by word into the configuration block RAM through the host port.
// A pulse on cfg_start makes the programmer shift the whole bitfile into the
// fabric's virtual configuration registers; cfg_done then stays high until the
// next cfg_start.  Loading a different bitfile and pulsing cfg_start again
// reconfigures the fabric for another circuit.  Data enters on fab_in (one word
// per input-row column per cycle) and leaves on fab_out.
//
// Sizes default to a 5x5 uniform fabric of 16-bit DSP CUs with 2 tracks per
// row channel and 4 per column channel.  The host write port is this design's
// choice.  Timing: cfg_done rises CFG_BITS + 2 cycles after cfg_start.
module if_top
  import if_pkg::*;
#(
  parameter int unsigned ROWS     = FAB_ROWS,
  parameter int unsigned COLS     = FAB_COLS,
  parameter int unsigned DATA_W   = FAB_DATA_W,
  parameter int unsigned H_TRACKS = FAB_H_TRACKS,
  parameter int unsigned V_TRACKS = FAB_V_TRACKS,
  localparam int unsigned CFG_BITS = fab_cfg_bits(ROWS, COLS, H_TRACKS, V_TRACKS),
  localparam int unsigned NWORDS   = (CFG_BITS + CFG_WORD_W - 1) / CFG_WORD_W,
  localparam int unsigned AW       = (NWORDS > 1) ? $clog2(NWORDS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // bitfile write port
  input  logic                        bf_we,
  input  logic [AW-1:0]               bf_addr,
  input  logic [CFG_WORD_W-1:0]       bf_wdata,
  // configuration control
  input  logic                        cfg_start,
  output logic                        cfg_busy,
  output logic                        cfg_done,
  // datapath
  input  logic [COLS-1:0][DATA_W-1:0] fab_in,
  output logic [COLS-1:0][DATA_W-1:0] fab_out
);

  logic                  re;
  logic [AW-1:0]         raddr;
  logic [CFG_WORD_W-1:0] rdata;
  logic                  shift_en, cfg_bit, cfg_tail;

  config_bram #(.WORD_W(CFG_WORD_W), .DEPTH(NWORDS)) u_bram (
    .clk, .we(bf_we), .waddr(bf_addr), .wdata(bf_wdata),
    .re, .raddr, .rdata);

  programmer #(.CFG_BITS(CFG_BITS), .WORD_W(CFG_WORD_W)) u_prog (
    .clk, .rst_n, .start(cfg_start), .busy(cfg_busy), .done(cfg_done),
    .re, .raddr, .rdata, .shift_en, .cfg_bit);

  fabric #(.ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W),
           .H_TRACKS(H_TRACKS), .V_TRACKS(V_TRACKS)) u_fabric (
    .clk, .rst_n, .cfg_shift_en(shift_en), .cfg_in(cfg_bit), .cfg_out(cfg_tail),
    .fab_in, .fab_out);

endmodule
