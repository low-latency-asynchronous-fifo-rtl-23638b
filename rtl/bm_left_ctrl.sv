// Left Controller (LC) of the base-protocol (burst-mode) FIFO cell.
//
// Hands a token to the left neighbour. A two-input C-element joins the left
// neighbour's request (left_req) with the Token Distributor's wish to pass a
// token (pass_r); its output is both left_ack and pass_a. The handshake on
// the left channel therefore completes only when a token is ready and the
// neighbour wants one. The behaviour is the document's; the one-step state
// register is this model's form of a gate delay.
//
// Interface: left_req, pass_r in; ack out. Timing: one clk step per edge.
module bm_left_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic left_req,
  input  logic pass_r,
  output logic ack
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   ack <= 1'b0;
    else if (left_req && pass_r)  ack <= 1'b1;
    else if (!left_req && !pass_r) ack <= 1'b0;
  end

endmodule
