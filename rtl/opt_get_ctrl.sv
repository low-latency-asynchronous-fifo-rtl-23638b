// Get Controller (GC) of the optimized token-ring FIFO cell.
//
// An asymmetric C-element. Its output re rises when a get request is on the
// bus, the register has already answered the early read request made under
// the GET token (ra high) and the register holds an item (valid high). It
// falls whenever get_req is low. re is the cell's get acknowledge and is also
// watched by the left neighbour's OGT as the token pulse. Set and reset
// conditions are the document's; the one-step state register is this model's.
//
// Interface: get_req, ra, valid in; re out. Timing: one clk step per edge.
module opt_get_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic get_req,
  input  logic ra,
  input  logic valid,
  output logic re
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    re <= 1'b0;
    else if (!get_req)             re <= 1'b0;
    else if (ra && valid)          re <= 1'b1;
  end

endmodule
