// Put or Get Controller of the base-protocol (burst-mode) FIFO cell.
//
// A two-input C-element, one instance for the put side and one for the get
// side. Its output rises when both the bus request (put_req or get_req) and
// the token request from the Token Distributor (ptok_r or gtok_r) are high,
// and falls when both are low. The output is at once the token acknowledge
// (ptok_a or gtok_a) back to the Token Distributor and the register's write
// or read enable; the register's own acknowledge then answers the bus. A cell
// without the token only sees the bus request toggle and does not respond.
// The burst-mode behaviour is the document's; the one-step state register is
// this model's form of a gate delay.
//
// Interface: req, tok_r in; ack out. Timing: ack follows one clk step later.
module bm_data_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic tok_r,
  output logic ack
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               ack <= 1'b0;
    else if (req && tok_r)    ack <= 1'b1;
    else if (!req && !tok_r)  ack <= 1'b0;
  end

endmodule
