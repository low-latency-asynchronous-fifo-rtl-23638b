// Repeater handshake component ("#") of the handshake-circuit FIFO.
//
// Once its passive activation input act_r is high, the repeater performs
// four-phase handshakes on its active port b for ever and never acknowledges
// the activation. This is the "forever do" of the cell and Starter
// programs. The component's function is the standard one of handshake
// circuits; this clocked unit-delay form is this design's.
//
// Interface: act_r in; b_r out, b_a in. Timing: b_r answers b_a one clk
// step later.
module hs_repeater (
  input  logic clk,
  input  logic rst_n,
  input  logic act_r,
  output logic b_r,
  input  logic b_a
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        b_r <= 1'b0;
    else if (!b_r && !b_a && act_r)    b_r <= 1'b1;
    else if (b_r && b_a)               b_r <= 1'b0;
  end

  // Four-phase rule on b: the acknowledge only rises on a raised request.
  a_b_ack: assert property (@(posedge clk) disable iff (!rst_n) $rose(b_a) |-> b_r);

endmodule
