// Call (MUX) handshake component of the handshake-circuit FIFO.
//
// M passive ports share one active port: a handshake started on passive
// port k is relayed to the active port o, and o's acknowledge is returned to
// port k only. Its users never request at the same time (they are sequenced
// by the circuit around it); this is asserted. When more than one request
// is seen in the same step the lowest-numbered port is served. The function
// is the standard one of handshake circuits; this clocked unit-delay form
// is this design's.
//
// Interface: a_r[M]/a_a[M] passive; o_r/o_a active. Timing: one clk step
// per handshake event.
module hs_call
  import tr_pkg::*;
#(
  parameter int unsigned M = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] a_r,
  output logic [M-1:0] a_a,
  output logic         o_r,
  input  logic         o_a
);

  call_state_t          state;
  logic [$clog2(M)-1:0] sel;
  logic [$clog2(M)-1:0] first;

  always_comb begin
    first = '0;
    for (int k = M - 1; k >= 0; k--) if (a_r[k]) first = k[$clog2(M)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CALL_IDLE;
      sel   <= '0;
    end else begin
      unique case (state)
        CALL_IDLE: if (|a_r) begin
                     state <= CALL_REQ;
                     sel   <= first;
                   end
        CALL_REQ:  if (o_a)       state <= CALL_ACK;
        CALL_ACK:  if (!a_r[sel]) state <= CALL_RTZ;
        CALL_RTZ:  if (!o_a)      state <= CALL_IDLE;
        default:                  state <= CALL_IDLE;
      endcase
    end
  end

  assign o_r = (state == CALL_REQ) || (state == CALL_ACK);
  always_comb begin
    a_a = '0;
    if (state == CALL_ACK || state == CALL_RTZ) a_a[sel] = 1'b1;
  end

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(a_r));

  a_o_ack: assert property (@(posedge clk) disable iff (!rst_n) $rose(o_a) |-> o_r);

endmodule
