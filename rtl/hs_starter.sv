// Starter of the handshake-circuit token-ring FIFO. It owns both tokens
// after reset and hands them out by completing two handshakes on its
// passive left channel; then, for ever, it fetches a token
// on its active right channel and hands it out on the left. Without a probe
// the loop asks on the right first and waits on the left second, so the
// interface order differs from bm_starter (right_req rises before any left
// request), while the role in the ring is the same.
// Components, from the Starter's handshake-circuit diagram:
//   s1  sequencer, started after reset: left via m1, then s2;
//   s2  sequencer: left via m1, then r1 (never acknowledged);
//   r1  repeater calling s3 for ever;
//   s3  sequencer: the active right channel, then left via m1;
//   m1  call joining s1, s2 and s3, passivated against the left channel by p1.
// Each component is a unit-delay clocked model.
module hs_starter (
  input  logic clk,
  input  logic rst_n,
  input  logic left_req,
  output logic left_ack,
  output logic right_req,
  input  logic right_ack
);

  logic s1_a, s2_r, s2_a, r1_act, s3_r, s3_a;
  logic [2:0] m1_r, m1_a;
  logic m1_o_r, m1_o_a;
  logic [0:0] p1_unused;

  hs_sequencer u_s1 (.clk, .rst_n, .a_r(1'b1), .a_a(s1_a),
                     .b1_r(m1_r[0]), .b1_a(m1_a[0]), .b2_r(s2_r), .b2_a(s2_a));
  hs_sequencer u_s2 (.clk, .rst_n, .a_r(s2_r), .a_a(s2_a),
                     .b1_r(m1_r[1]), .b1_a(m1_a[1]), .b2_r(r1_act), .b2_a(1'b0));
  hs_repeater  u_r1 (.clk, .rst_n, .act_r(r1_act), .b_r(s3_r), .b_a(s3_a));
  hs_sequencer u_s3 (.clk, .rst_n, .a_r(s3_r), .a_a(s3_a),
                     .b1_r(right_req), .b1_a(right_ack), .b2_r(m1_r[2]), .b2_a(m1_a[2]));

  hs_call #(.M(3)) u_m1 (.clk, .rst_n, .a_r(m1_r), .a_a(m1_a), .o_r(m1_o_r), .o_a(m1_o_a));

  hs_passivator #(.WIDTH(1)) u_p1 (.clk, .rst_n, .a_r(m1_o_r), .b_r(left_req),
                                   .ack(m1_o_a), .d_in(1'b0), .d_out(p1_unused));
  assign left_ack = m1_o_a;

  // The Starter's program never terminates: s1 is never acknowledged.
  a_never_done: assert property (@(posedge clk) disable iff (!rst_n) !s1_a);

endmodule
