// Two-way sequencer handshake component (";") of the handshake-circuit FIFO.
//
// For each handshake on its passive port a, it performs a complete
// four-phase handshake on its first active port b1, then one on its second
// active port b2, and then acknowledges a; a_a falls after a_r falls. This is
// the ";" of the cell and Starter programs. The function is the standard one
// of handshake circuits; this clocked unit-delay form, with no overlap
// between the two handshakes, is this design's.
//
// Interface: a_r/a_a passive; b1_r/b1_a and b2_r/b2_a active.
// Timing: every output answers its input one clk step later.
module hs_sequencer
  import tr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic a_r,
  output logic a_a,
  output logic b1_r,
  input  logic b1_a,
  output logic b2_r,
  input  logic b2_a
);

  seq_state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEQ_IDLE;
    end else begin
      unique case (state)
        SEQ_IDLE:   if (a_r)   state <= SEQ_FIRST;
        SEQ_FIRST:  if (b1_a)  state <= SEQ_FIRST0;
        SEQ_FIRST0: if (!b1_a) state <= SEQ_SECOND;
        SEQ_SECOND: if (b2_a)  state <= SEQ_SECND0;
        SEQ_SECND0: if (!b2_a) state <= SEQ_DONE;
        SEQ_DONE:   if (!a_r)  state <= SEQ_IDLE;
        default:               state <= SEQ_IDLE;
      endcase
    end
  end

  assign b1_r = (state == SEQ_FIRST);
  assign b2_r = (state == SEQ_SECOND);
  assign a_a  = (state == SEQ_DONE);

  // Four-phase rules on the three channels: an acknowledge only moves while
  // its request is at the level it answers, and a request only falls once
  // acknowledged.
  a_b1_ack:  assert property (@(posedge clk) disable iff (!rst_n) $rose(b1_a) |-> b1_r);
  a_b2_ack:  assert property (@(posedge clk) disable iff (!rst_n) $rose(b2_a) |-> b2_r);
  a_a_rtz:   assert property (@(posedge clk) disable iff (!rst_n) $fell(a_r)  |-> a_a);

endmodule
