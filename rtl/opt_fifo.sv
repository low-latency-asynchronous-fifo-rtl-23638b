// Optimized-protocol token-ring FIFO: N cells on common put and get buses.
//
// The cells form a ring through which a PUT token and a GET token circulate,
// the PUT token always ahead. Cell i receives both tokens from cell i-1
// (its right-hand neighbour; cell 0 from cell N-1). After reset cell 0 holds
// both tokens and every register is empty. An item is written into the
// register of the cell holding the PUT token and read from the cell holding
// the GET token; it is never moved, so an item entering an empty FIFO is at
// the output after one cell's worth of control logic, whatever N is.
// The environment's put and get channels are passive four-phase bundled-data
// channels: it raises put_req with put_data stable until put_ack falls, and
// raises get_req and takes get_data while get_ack is high. put_ack and
// get_ack are the OR of the cells' acknowledges and get_data the OR of the
// cells' bus drives (one cell drives at a time). FIFO empty: a get request
// waits in the GET cell until an item is written there. FIFO full: a put
// request waits in the PUT cell until its item has been read. The ring and
// the merged acknowledges follow the document; the OR-bus in place of
// tri-state drivers is this design's choice.
//
// Parameters: N cells (capacity N, N >= 2), WIDTH data bits.
// Timing: latency put_req+ to get_ack+ in an empty FIFO is 3 clk steps.
module opt_fifo #(
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

  logic [N-1:0]            we, re, cell_put_ack, cell_get_ack;
  logic [N-1:0][WIDTH-1:0] cell_data;

  for (genvar i = 0; i < N; i++) begin : g_cell
    localparam int unsigned RIGHT = (i == 0) ? N - 1 : i - 1;
    opt_cell #(.WIDTH(WIDTH), .HAS_TOKENS(i == 0)) u_cell (
      .clk, .rst_n,
      .put_req,
      .put_data,
      .put_ack  (cell_put_ack[i]),
      .get_req,
      .get_data (cell_data[i]),
      .get_ack  (cell_get_ack[i]),
      .we1      (we[RIGHT]),
      .re1      (re[RIGHT]),
      .we       (we[i]),
      .re       (re[i])
    );
  end

  always_comb begin
    get_data = '0;
    for (int i = 0; i < N; i++) get_data |= cell_data[i];
  end

  assign put_ack = |cell_put_ack;
  assign get_ack = |cell_get_ack;

  // At most one cell writes and at most one cell reads at any time.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(we));
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(re));

endmodule
