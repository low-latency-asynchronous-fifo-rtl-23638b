// ObtainGetToken (OGT) of the optimized token-ring FIFO cell.
//
// The GET token arrives as a complete pulse on re1, the read enable of the
// right-hand neighbour. OGT then raises gtok. Unlike the put side, gtok stays
// high while this cell's read enable re is high and falls only when re falls:
// gtok is also the register's read request, so the item stays on the get bus
// for the whole get handshake (early read enable). The four-state graph is
// the document's; the unit-delay clocked form is this model's own.
//
// Interface: re1 and re in, gtok out. Timing: each transition takes one clk
// step. INIT_TOKEN=1 starts the machine holding the token.
module opt_obtain_get_token
  import tr_pkg::*;
#(
  parameter bit INIT_TOKEN = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic re1,
  input  logic re,
  output logic gtok
);

  tok_state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= INIT_TOKEN ? TOK_HELD : TOK_WAIT_RISE;
    end else begin
      unique case (state)
        TOK_WAIT_RISE: if (re1)  state <= TOK_WAIT_FALL;
        TOK_WAIT_FALL: if (!re1) state <= TOK_HELD;      // gtok+
        TOK_HELD:      if (re)   state <= TOK_IN_USE;
        TOK_IN_USE:    if (!re)  state <= TOK_WAIT_RISE; // gtok-
        default:                 state <= TOK_WAIT_RISE;
      endcase
    end
  end

  assign gtok = (state == TOK_HELD) || (state == TOK_IN_USE);

endmodule
