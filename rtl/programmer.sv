// Configuration programmer.
//
// On start it reads the bitfile word by word from the configuration block RAM
// and shifts it, LSB first, into the fabric's configuration chain, one bit per
// cycle, then raises done.  The next word is fetched while the current one is
// still shifting, so the chain receives CFG_BITS bits in CFG_BITS consecutive
// cycles.  The architecture defines what the programmer does (load the bitfile from
// block RAM by shifting bits into the virtual configuration registers); the
// prefetching state machine and the handshake are this design's own.
//
// Interface: start (a one-cycle request, accepted when idle or done), busy,
// done (held until the next start); RAM read port re/raddr with rdata valid
// one cycle after re; chain port shift_en/cfg_bit.
// Timing: the first bit is shifted two cycles after start is seen, and done is
// high from CFG_BITS + 2 cycles after that edge.
module programmer #(
  parameter int unsigned CFG_BITS = 64,
  parameter int unsigned WORD_W   = if_pkg::CFG_WORD_W,
  localparam int unsigned NWORDS  = (CFG_BITS + WORD_W - 1) / WORD_W,
  localparam int unsigned AW      = (NWORDS > 1) ? $clog2(NWORDS) : 1,
  localparam int unsigned CW      = $clog2(CFG_BITS + 1),
  localparam int unsigned BW      = (WORD_W > 1) ? $clog2(WORD_W) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              re,
  output logic [AW-1:0]     raddr,
  input  logic [WORD_W-1:0] rdata,
  output logic              shift_en,
  output logic              cfg_bit
);

  typedef enum logic [1:0] {P_IDLE, P_LOAD, P_SHIFT, P_DONE} pstate_e;

  pstate_e           state;
  logic [WORD_W-1:0] word_q;
  logic [CW-1:0]     remaining;
  logic [BW-1:0]     bit_idx;
  logic [AW:0]       next_addr;

  assign busy     = (state == P_LOAD) || (state == P_SHIFT);
  assign done     = (state == P_DONE);
  assign shift_en = (state == P_SHIFT);
  assign cfg_bit  = word_q[0];

  // RAM read requests: the first word when starting, then one word ahead.
  always_comb begin
    re    = 1'b0;
    raddr = '0;
    if ((state == P_IDLE || state == P_DONE) && start) begin
      re    = 1'b1;
      raddr = '0;
    end else if ((state == P_LOAD ||
                  (state == P_SHIFT && bit_idx == BW'(WORD_W - 1))) &&
                 next_addr < (AW+1)'(NWORDS)) begin
      re    = 1'b1;
      raddr = next_addr[AW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      word_q    <= '0;
      remaining <= '0;
      bit_idx   <= '0;
      next_addr <= '0;
    end else begin
      unique case (state)
        P_IDLE, P_DONE: if (start) begin
          state     <= P_LOAD;
          next_addr <= (AW+1)'(1);
          remaining <= CW'(CFG_BITS);
        end
        P_LOAD: begin
          word_q    <= rdata;
          bit_idx   <= '0;
          state     <= P_SHIFT;
          if (re) next_addr <= next_addr + 1'b1;
        end
        P_SHIFT: begin
          remaining <= remaining - 1'b1;
          if (remaining == CW'(1)) begin
            state <= P_DONE;
          end else if (bit_idx == BW'(WORD_W - 1)) begin
            word_q  <= rdata;
            bit_idx <= '0;
            if (re) next_addr <= next_addr + 1'b1;
          end else begin
            word_q  <= word_q >> 1;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // A start while the programmer is loading would be ignored.
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
      busy |-> !start);

endmodule
