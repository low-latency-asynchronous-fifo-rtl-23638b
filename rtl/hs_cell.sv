// One cell of the base-protocol token-ring FIFO, built as a handshake
// circuit: a network of standard handshake components that, for ever,
// obtains the PUT token from the right, takes an item from the put bus into
// its register, passes the token left; then obtains the GET token from the
// right, gives the item to the get bus and passes the token left.
//
// Components and wiring follow the cell's handshake-circuit diagram:
//   r1  repeater, started after reset, calls s1 for ever;
//   s1  sequencer: s2 (the put half), then s4 (the get half);
//   s2  sequencer: right handshake through m1, then s3;
//   s3  sequencer: transfer t1 (put channel -> register), then left via m2;
//   s4  sequencer: right handshake through m1, then s5;
//   s5  sequencer: transfer t2 (register -> get channel), then left via m2;
//   m1  call joining s2 and s4 onto the active right channel;
//   m2  call joining s3 and s5, passivated against the left channel by p3;
//   p1  passivator joining the put channel with t1's pull;
//   p2  passivator joining t2's push with the get channel;
//   REG the cell register (write port fed by t1, read port pulled by t2).
// The interface behaviour matches bm_cell: right is active, left, put and
// get are passive four-phase channels. Each component is a unit-delay
// clocked model, so this cell is slower in steps than bm_cell.
module hs_cell #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             put_req,
  input  logic [WIDTH-1:0] put_data,
  output logic             put_ack,
  input  logic             get_req,
  output logic [WIDTH-1:0] get_data,
  output logic             get_ack,
  output logic             right_req,
  input  logic             right_ack,
  input  logic             left_req,
  output logic             left_ack
);

  logic s1_r, s1_a;
  logic s2_r, s2_a, s4_r, s4_a;
  logic s3_r, s3_a, s5_r, s5_a;
  logic m1a_r, m1a_a, m1b_r, m1b_a;      // m1 inputs from s2 and s4
  logic m2a_r, m2a_a, m2b_r, m2b_a;      // m2 inputs from s3 and s5
  logic m2_o_r, m2_o_a;
  logic t1_r, t1_a, t2_r, t2_a;
  logic t1_i_r, t1_i_a, t1_o_r, t1_o_a;
  logic t2_i_r, t2_i_a, t2_o_r, t2_o_a;
  logic [WIDTH-1:0] put_d, reg_d, reg_q, get_d;

  hs_repeater u_r1 (.clk, .rst_n, .act_r(1'b1), .b_r(s1_r), .b_a(s1_a));

  hs_sequencer u_s1 (.clk, .rst_n, .a_r(s1_r), .a_a(s1_a),
                     .b1_r(s2_r), .b1_a(s2_a), .b2_r(s4_r), .b2_a(s4_a));
  hs_sequencer u_s2 (.clk, .rst_n, .a_r(s2_r), .a_a(s2_a),
                     .b1_r(m1a_r), .b1_a(m1a_a), .b2_r(s3_r), .b2_a(s3_a));
  hs_sequencer u_s3 (.clk, .rst_n, .a_r(s3_r), .a_a(s3_a),
                     .b1_r(t1_r), .b1_a(t1_a), .b2_r(m2a_r), .b2_a(m2a_a));
  hs_sequencer u_s4 (.clk, .rst_n, .a_r(s4_r), .a_a(s4_a),
                     .b1_r(m1b_r), .b1_a(m1b_a), .b2_r(s5_r), .b2_a(s5_a));
  hs_sequencer u_s5 (.clk, .rst_n, .a_r(s5_r), .a_a(s5_a),
                     .b1_r(t2_r), .b1_a(t2_a), .b2_r(m2b_r), .b2_a(m2b_a));

  hs_call #(.M(2)) u_m1 (.clk, .rst_n,
                         .a_r({m1b_r, m1a_r}), .a_a({m1b_a, m1a_a}),
                         .o_r(right_req), .o_a(right_ack));
  hs_call #(.M(2)) u_m2 (.clk, .rst_n,
                         .a_r({m2b_r, m2a_r}), .a_a({m2b_a, m2a_a}),
                         .o_r(m2_o_r), .o_a(m2_o_a));

  // Left channel: m2's request meets the left neighbour's request.
  logic [0:0] p3_unused;
  hs_passivator #(.WIDTH(1)) u_p3 (.clk, .rst_n, .a_r(m2_o_r), .b_r(left_req),
                                   .ack(m2_o_a), .d_in(1'b0), .d_out(p3_unused));
  assign left_ack = m2_o_a;

  // Put channel into the register.
  hs_passivator #(.WIDTH(WIDTH)) u_p1 (.clk, .rst_n, .a_r(put_req), .b_r(t1_i_r),
                                       .ack(t1_i_a), .d_in(put_data), .d_out(put_d));
  assign put_ack = t1_i_a;

  hs_transferer #(.WIDTH(WIDTH)) u_t1 (.clk, .rst_n, .a_r(t1_r), .a_a(t1_a),
                                       .i_r(t1_i_r), .i_a(t1_i_a), .i_d(put_d),
                                       .o_r(t1_o_r), .o_a(t1_o_a), .o_d(reg_d));

  cell_reg #(.WIDTH(WIDTH)) u_reg (.clk, .rst_n,
                                   .wr(t1_o_r), .wa(t1_o_a), .d(reg_d),
                                   .rr(t2_i_r), .ra(t2_i_a), .q(reg_q));

  // Register onto the get channel.
  hs_transferer #(.WIDTH(WIDTH)) u_t2 (.clk, .rst_n, .a_r(t2_r), .a_a(t2_a),
                                       .i_r(t2_i_r), .i_a(t2_i_a), .i_d(reg_q),
                                       .o_r(t2_o_r), .o_a(t2_o_a), .o_d(get_d));

  hs_passivator #(.WIDTH(WIDTH)) u_p2 (.clk, .rst_n, .a_r(t2_o_r), .b_r(get_req),
                                       .ack(t2_o_a), .d_in(get_d), .d_out(get_data));
  assign get_ack = t2_o_a;

endmodule
