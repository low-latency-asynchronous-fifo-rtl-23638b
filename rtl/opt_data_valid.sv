// DataValid (DV) of the optimized token-ring FIFO cell.
//
// Tells whether the cell register holds an item that has not been dequeued.
// valid rises as soon as we rises (the item is usable while the put handshake
// is still returning to zero) and falls only after a full pulse on re, that
// is when re falls after having risen, so that the register cannot be
// overwritten while it is being read. The event order is the document's; the
// flag that remembers re+ is this model's way of sequencing it.
//
// Interface: we, re in; valid out. Timing: valid follows we+ and re- one clk
// step later.
module opt_data_valid (
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  logic re,
  output logic valid
);

  logic read_seen;  // re has risen since valid rose

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid     <= 1'b0;
      read_seen <= 1'b0;
    end else if (!valid) begin
      if (we) valid <= 1'b1;
    end else if (!read_seen) begin
      if (re) read_seen <= 1'b1;
    end else if (!re) begin
      valid     <= 1'b0;
      read_seen <= 1'b0;
    end
  end

endmodule
