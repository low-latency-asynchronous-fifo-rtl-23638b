// Token-ring FIFOs, top level: the optimized-protocol FIFO and two
// implementations of the base-protocol FIFO side by side.
//
// Both are N-place, WIDTH-bit asynchronous FIFOs whose items stay in the cell
// that received them while a PUT token and a GET token circulate around a
// ring of cells. opt_* is the optimized protocol, the main design: the cell
// may start dequeuing while its enqueue is still returning to zero and
// drives the get bus as soon as it holds the GET token. bm_* is the base
// protocol, in which each cell enqueues, passes the PUT token, then obtains
// the GET token, dequeues and passes it; it needs a Starter cell. bm_* builds
// the base cell from burst-mode controllers, hs_* builds it as a handshake
// circuit (repeaters, sequencers, calls, transferers, passivators); the two
// behave the same at their channels, the handshake one taking more steps.
// The three FIFOs share only clk (the model's time step) and rst_n; each has
// its own passive four-phase bundled-data put and get channels.
//
// Defaults: N = 4 places, WIDTH = 8 bits, the configuration whose results
// the design is best known for.
module token_ring_fifo_top #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             opt_put_req,
  input  logic [WIDTH-1:0] opt_put_data,
  output logic             opt_put_ack,
  input  logic             opt_get_req,
  output logic [WIDTH-1:0] opt_get_data,
  output logic             opt_get_ack,
  input  logic             bm_put_req,
  input  logic [WIDTH-1:0] bm_put_data,
  output logic             bm_put_ack,
  input  logic             bm_get_req,
  output logic [WIDTH-1:0] bm_get_data,
  output logic             bm_get_ack,
  input  logic             hs_put_req,
  input  logic [WIDTH-1:0] hs_put_data,
  output logic             hs_put_ack,
  input  logic             hs_get_req,
  output logic [WIDTH-1:0] hs_get_data,
  output logic             hs_get_ack
);

  opt_fifo #(.N(N), .WIDTH(WIDTH)) u_opt (
    .clk, .rst_n,
    .put_req  (opt_put_req),
    .put_data (opt_put_data),
    .put_ack  (opt_put_ack),
    .get_req  (opt_get_req),
    .get_data (opt_get_data),
    .get_ack  (opt_get_ack)
  );

  bm_fifo #(.N(N), .WIDTH(WIDTH)) u_bm (
    .clk, .rst_n,
    .put_req  (bm_put_req),
    .put_data (bm_put_data),
    .put_ack  (bm_put_ack),
    .get_req  (bm_get_req),
    .get_data (bm_get_data),
    .get_ack  (bm_get_ack)
  );

  hs_fifo #(.N(N), .WIDTH(WIDTH)) u_hs (
    .clk, .rst_n,
    .put_req  (hs_put_req),
    .put_data (hs_put_data),
    .put_ack  (hs_put_ack),
    .get_req  (hs_get_req),
    .get_data (hs_get_data),
    .get_ack  (hs_get_ack)
  );

endmodule
