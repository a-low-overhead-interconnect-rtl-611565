// Virtual configuration registers of the fabric.
//
// All configuration bits (switch-box mux selects, CU operations and delays,
// output selects) live in one shift register of LEN bits.  While shift_en is
// high, cfg_in enters at the top end and every bit moves one place down, so
// after LEN shifts bit i of cfg holds the i-th bit shifted in.  cfg_out is the
// bit that falls off the bottom end, which lets chains be cascaded or read
// back.  The architecture says only that the programmer shifts the bitfile into
// the virtual configuration registers; keeping them as one chain, the shift
// direction and reset to all-zero are this design's choices.
module cfg_chain #(
  parameter int unsigned LEN = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           cfg_in,
  output logic           cfg_out,
  output logic [LEN-1:0] cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // cleared bit by bit: chains of large fabrics exceed 10,000 bits
      for (int i = 0; i < LEN; i++) cfg[i] <= 1'b0;
    end
    else if (shift_en) cfg <= {cfg_in, cfg[LEN-1:1]};
  end

  assign cfg_out = cfg[0];

endmodule
