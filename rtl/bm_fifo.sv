// Base-protocol token-ring FIFO: N burst-mode cells and a Starter in a ring.
//
// The cells share the put and get buses; a PUT token and a GET token travel
// around the ring, the PUT token ahead, and only the cell holding a token may
// use the matching bus. Tokens move from each element's active right channel
// request to its right-hand neighbour's passive left channel: cell i asks
// cell i-1, cell 0 asks the Starter, and the Starter asks cell N-1. The
// Starter gives out the PUT token and then the GET token once after reset and
// afterwards only relays tokens from cell N-1 to cell 0. Items never move;
// put_ack and get_ack are the OR of the cells' acknowledges and get_data the
// OR of the cells' bus drives. Here, unlike the optimized design, a cell
// finishes the whole put handshake and passes the PUT token before it asks
// for the GET token, so latency and cycle time are longer. The ring,
// Starter and merged acknowledges follow the document; the OR-bus is this
// design's choice.
//
// Parameters: N cells (capacity N, N >= 1), WIDTH data bits.
module bm_fifo #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             put_req,
  input  logic [WIDTH-1:0] put_data,
  output logic             put_ack,
  input  logic             get_req,
  output logic [WIDTH-1:0] get_data,
  output logic             get_ack
);

  // Channel c joins the right port of element c to the left port of the
  // element to its right. Elements 0..N-1 are cells; N is the Starter.
  logic [N:0]              ch_req, ch_ack;
  logic [N-1:0]            cell_put_ack, cell_get_ack;
  logic [N-1:0][WIDTH-1:0] cell_data;

  for (genvar i = 0; i < N; i++) begin : g_cell
    // Cell i's right neighbour is cell i-1; cell 0's is the Starter.
    localparam int unsigned RCH = i;
    // Cell i's left port answers cell i+1's right port (channel i+1); for
    // cell N-1 that is the Starter's right port, channel N.
    localparam int unsigned LCH = i + 1;
    bm_cell #(.WIDTH(WIDTH)) u_cell (
      .clk, .rst_n,
      .put_req, .put_data,
      .put_ack   (cell_put_ack[i]),
      .get_req,
      .get_data  (cell_data[i]),
      .get_ack   (cell_get_ack[i]),
      .right_req (ch_req[RCH]),
      .right_ack (ch_ack[RCH]),
      .left_req  (ch_req[LCH]),
      .left_ack  (ch_ack[LCH])
    );
  end

  // The Starter sits between cell N-1 (its right) and cell 0 (its left):
  // its left port answers cell 0's right channel (ch 0), its right port
  // requests on channel N from cell N-1.
  bm_starter u_starter (
    .clk, .rst_n,
    .left_req  (ch_req[0]),
    .left_ack  (ch_ack[0]),
    .right_req (ch_req[N]),
    .right_ack (ch_ack[N])
  );

  always_comb begin
    get_data = '0;
    for (int i = 0; i < N; i++) get_data |= cell_data[i];
  end

  assign put_ack = |cell_put_ack;
  assign get_ack = |cell_get_ack;

endmodule
