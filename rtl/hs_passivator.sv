// Passivator handshake component ("•") of the handshake-circuit FIFO.
//
// Joins two passive ports: the handshake completes only when both sides
// request, and both are acknowledged together by one C-element output. It is
// how an active port inside the cell meets a channel on which the cell is
// passive (the put, get and left channels). Data, when the channel carries
// any, flows from the pushing side (d_in) to the pulling side (d_out)
// unchanged; the value is valid while the acknowledge is high. The function
// is the standard one; the clocked C-element is this design's model of it.
//
// Interface: a_r, b_r in; ack out (to both sides); d_in in, d_out out.
// Timing: ack answers one clk step after both requests agree.
module hs_passivator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             a_r,
  input  logic             b_r,
  output logic             ack,
  input  logic [WIDTH-1:0] d_in,
  output logic [WIDTH-1:0] d_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              ack <= 1'b0;
    else if (a_r && b_r)     ack <= 1'b1;
    else if (!a_r && !b_r)   ack <= 1'b0;
  end

  assign d_out = d_in;

endmodule
