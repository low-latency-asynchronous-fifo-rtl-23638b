// Transferer handshake component of the handshake-circuit FIFO.
//
// When activated on its passive port a, it pulls a value on its active input
// port i, pushes that value on its active output port o, and acknowledges a
// once the push is acknowledged. On a_r falling it releases both active
// ports together and lowers a_a when both have returned to zero. This is the
// put (put channel into the register) and the get (register onto the get
// channel) of the cell. The function is the standard one; this
// clocked unit-delay form is this design's.
//
// Interface: a_r/a_a passive; i_r/i_a/i_d pull; o_r/o_a/o_d push.
// Timing: one clk step per handshake event; o_d follows i_d directly.
module hs_transferer
  import tr_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             a_r,
  output logic             a_a,
  output logic             i_r,
  input  logic             i_a,
  input  logic [WIDTH-1:0] i_d,
  output logic             o_r,
  input  logic             o_a,
  output logic [WIDTH-1:0] o_d
);

  tr_state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TR_IDLE;
    end else begin
      unique case (state)
        TR_IDLE: if (a_r)          state <= TR_PULL;
        TR_PULL: if (i_a)          state <= TR_PUSH;
        TR_PUSH: if (o_a)          state <= TR_DONE;
        TR_DONE: if (!a_r)         state <= TR_RTZ;
        TR_RTZ:  if (!i_a && !o_a) state <= TR_IDLE;
        default:                   state <= TR_IDLE;
      endcase
    end
  end

  assign i_r = (state == TR_PULL) || (state == TR_PUSH) || (state == TR_DONE);
  assign o_r = (state == TR_PUSH) || (state == TR_DONE);
  assign a_a = (state == TR_DONE) || (state == TR_RTZ);
  assign o_d = i_d;

  // Four-phase rules: the activation only falls once acknowledged; the
  // passive sides only acknowledge a raised request.
  a_a_rtz:  assert property (@(posedge clk) disable iff (!rst_n) $fell(a_r) |-> a_a);
  a_i_ack:  assert property (@(posedge clk) disable iff (!rst_n) $rose(i_a) |-> i_r);
  a_o_ack:  assert property (@(posedge clk) disable iff (!rst_n) $rose(o_a) |-> o_r);

endmodule
