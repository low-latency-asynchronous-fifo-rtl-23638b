// Put Controller (PC) of the optimized token-ring FIFO cell.
//
// An asymmetric C-element. Its output we (write enable of the cell register)
// rises when all three inputs call for a write: a put request on the bus, the
// PUT token (ptok) and an empty register (valid low). It falls only when both
// put_req and ptok are low; valid plays no part in the falling edge. The set
// and reset conditions are the document's; the one-step register that holds
// the C-element's state is this model's form of a gate delay.
//
// Interface: put_req, ptok, valid in; we out. Timing: we follows its set or
// reset condition one clk step later.
module opt_put_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic put_req,
  input  logic ptok,
  input  logic valid,
  output logic we
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       we <= 1'b0;
    else if (put_req && ptok && !valid) we <= 1'b1;
    else if (!put_req && !ptok)       we <= 1'b0;
  end

endmodule
