// One cell of the optimized-protocol token-ring FIFO.
//
// A cell stores one item and never moves it. It takes part in two token
// rings at once: it may enqueue from the common put bus only while it holds
// the PUT token, and dequeue onto the common get bus only while it holds the
// GET token. The tokens travel as single wires: the right neighbour's write
// enable we1 carries the PUT token and its read enable re1 the GET token; a
// full pulse on either hands the token over. Inside, following the
// document's cell schematic:
//   OPT  turns a we1 pulse into ptok, dropped when this cell's we rises;
//   OGT  turns an re1 pulse into gtok, held until this cell's re falls;
//   PC   raises we on put_req & ptok & !valid, lowers it on !put_req & !ptok;
//   REG  latches put_data while we is high, acknowledges with wa (put_ack),
//        and drives get_data while gtok is high (early read enable, before
//        any get request), acknowledging with ra;
//   GC   raises re on get_req & ra & valid, lowers it on !get_req; re is the
//        cell's get acknowledge;
//   DV   raises valid on we+ and lowers it after re has risen and fallen.
// Enqueue and dequeue of the same cell may overlap: dequeue can start as soon
// as valid rises, while the put handshake is still returning to zero.
// HAS_TOKENS=1 makes the cell hold both tokens after reset; the FIFO needs no
// separate Starter cell. The wiring is the document's; the clocked unit-delay
// form of each element is this model's.
//
// Timing in clk steps, empty FIFO, GET token present and get_req waiting:
// put_req+ -> we+ (1) -> valid+ (2) -> re+ = get_ack+ (3).
module opt_cell #(
  parameter int unsigned WIDTH      = 8,
  parameter bit          HAS_TOKENS = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             put_req,
  input  logic [WIDTH-1:0] put_data,
  output logic             put_ack,
  input  logic             get_req,
  output logic [WIDTH-1:0] get_data,
  output logic             get_ack,
  input  logic             we1,
  input  logic             re1,
  output logic             we,
  output logic             re
);

  logic ptok, gtok, valid, ra;

  opt_obtain_put_token #(.INIT_TOKEN(HAS_TOKENS)) u_opt (
    .clk, .rst_n, .we1, .we, .ptok
  );

  opt_obtain_get_token #(.INIT_TOKEN(HAS_TOKENS)) u_ogt (
    .clk, .rst_n, .re1, .re, .gtok
  );

  opt_put_ctrl u_pc (
    .clk, .rst_n, .put_req, .ptok, .valid, .we
  );

  opt_get_ctrl u_gc (
    .clk, .rst_n, .get_req, .ra, .valid, .re
  );

  opt_data_valid u_dv (
    .clk, .rst_n, .we, .re, .valid
  );

  cell_reg #(.WIDTH(WIDTH)) u_reg (
    .clk, .rst_n,
    .wr (we),
    .wa (put_ack),
    .d  (put_data),
    .rr (gtok),
    .ra (ra),
    .q  (get_data)
  );

  assign get_ack = re;

  // PC may only write an empty register, GC only read a full one.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(we) |-> !$past(valid));
  a_read_valid: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(re) |-> $past(valid) && $past(gtok));

endmodule
