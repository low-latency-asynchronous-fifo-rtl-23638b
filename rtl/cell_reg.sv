// Data register of one FIFO cell, shared by both FIFO designs.
//
// One WIDTH-bit word stored in level-sensitive latches: the latches are
// transparent while the write request wr is high and hold when it falls, so
// an item being written already appears at the read port. The write
// acknowledge wa and the read acknowledge ra are copies of wr and rr delayed
// by one clk step, standing for the register's matched delays. While rr is
// high the word is driven onto the cell's share of the get bus, q; otherwise
// q is zero, so the FIFO forms its get bus as the OR of all cells' q (the
// gate-level equivalent of the document's tri-state bus). The storage being
// latches follows the document, and the latch reported by synthesis for
// `word` is intended; the delay model and the OR-bus are this design's choices.
//
// Interface: wr/wa and d (write port), rr/ra and q (read port).
// Timing: wa and ra follow their requests one clk step later; q follows rr
// and, through a transparent latch, d without delay.
module cell_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  output logic             wa,
  input  logic [WIDTH-1:0] d,
  input  logic             rr,
  output logic             ra,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] word;

  always_latch begin
    if (wr) word = d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= 1'b0;
      ra <= 1'b0;
    end else begin
      wa <= wr;
      ra <= rr;
    end
  end

  assign q = rr ? word : '0;

endmodule
