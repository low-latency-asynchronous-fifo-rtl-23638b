// One cell of the base-protocol token-ring FIFO, as communicating burst-mode
// machines.
//
// The cell repeats: obtain the PUT token from the right neighbour, enqueue
// one item from the put bus, pass the token to the left neighbour; obtain the
// GET token from the right, dequeue the item onto the get bus, pass the token
// left. Both tokens travel on the same pair of channels, in that order. The
// decomposition is the document's:
//   TD   Token Distributor: right-channel handshakes, then ptok or gtok, then
//        pass;
//   PC   C-element of put_req and ptok_r; its output is the register's write
//        enable and ptok_a; the register's write acknowledge is put_ack;
//   GC   C-element of get_req and gtok_r; its output is the register's read
//        enable and gtok_a; the register's read acknowledge is get_ack;
//   LC   C-element of left_req and pass_r, giving left_ack and pass_a;
//   REG  the shared latch register.
// Channels right (active) and left (passive) are four-phase; put and get are
// passive four-phase bundled-data channels. Each element is a unit-delay
// clocked model of the asynchronous circuit.
module bm_cell #(
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

  logic ptok_r, ptok_a, gtok_r, gtok_a, pass_r, pass_a;

  bm_token_distributor u_td (
    .clk, .rst_n,
    .right_req, .right_ack,
    .ptok_r, .ptok_a,
    .gtok_r, .gtok_a,
    .pass_r, .pass_a
  );

  bm_data_ctrl u_pc (.clk, .rst_n, .req(put_req), .tok_r(ptok_r), .ack(ptok_a));
  bm_data_ctrl u_gc (.clk, .rst_n, .req(get_req), .tok_r(gtok_r), .ack(gtok_a));
  bm_left_ctrl u_lc (.clk, .rst_n, .left_req, .pass_r, .ack(pass_a));

  assign left_ack = pass_a;

  cell_reg #(.WIDTH(WIDTH)) u_reg (
    .clk, .rst_n,
    .wr (ptok_a),
    .wa (put_ack),
    .d  (put_data),
    .rr (gtok_a),
    .ra (get_ack),
    .q  (get_data)
  );

endmodule
