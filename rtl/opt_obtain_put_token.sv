// ObtainPutToken (OPT) of the optimized token-ring FIFO cell.
//
// The PUT token arrives as a complete pulse on we1, the write enable of the
// right-hand neighbour: we1 rising and then falling means that neighbour has
// latched its item and handed the token on. OPT then raises ptok, which
// enables this cell's Put Controller. When this cell starts its own write
// (we rises) ptok is dropped at once; the machine then waits for we to fall
// before watching we1 again. The four-state graph is the document's; the
// unit-delay clocked form is this model's own.
//
// Interface: we1 and we in, ptok out. Timing: each transition takes one clk
// step. INIT_TOKEN=1 starts the machine in the token-held state, which is how
// the one cell that owns both tokens after reset is made.
module opt_obtain_put_token
  import tr_pkg::*;
#(
  parameter bit INIT_TOKEN = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic we1,
  input  logic we,
  output logic ptok
);

  tok_state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= INIT_TOKEN ? TOK_HELD : TOK_WAIT_RISE;
    end else begin
      unique case (state)
        TOK_WAIT_RISE: if (we1)  state <= TOK_WAIT_FALL;
        TOK_WAIT_FALL: if (!we1) state <= TOK_HELD;     // ptok+
        TOK_HELD:      if (we)   state <= TOK_IN_USE;   // ptok-
        TOK_IN_USE:    if (!we)  state <= TOK_WAIT_RISE;
        default:                 state <= TOK_WAIT_RISE;
      endcase
    end
  end

  assign ptok = (state == TOK_HELD);

endmodule
