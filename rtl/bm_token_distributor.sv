// Token Distributor (TD) of the base-protocol (burst-mode) FIFO cell.
//
// The core controller of the cell. It alternates forever between the PUT and
// the GET token. For each: a four-phase handshake on the active right channel
// obtains the token (right_req was raised at the end of the previous round,
// and is high after reset); a four-phase handshake on ptok (or gtok) lets the
// Put (or Get) Controller do its data operation; a four-phase handshake on
// pass gives the token to the Left Controller for the left neighbour. Then
// right_req rises again for the next token. The twelve-state graph, with one
// output change per input change, is the document's; its clocked form, one
// state step per clk, is this model's.
//
// Interface: right_req/right_ack, ptok_r/ptok_a, gtok_r/gtok_a, pass_r/pass_a.
// Timing: each output responds one clk step after the input that causes it.
module bm_token_distributor
  import tr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic right_req,
  input  logic right_ack,
  output logic ptok_r,
  input  logic ptok_a,
  output logic gtok_r,
  input  logic gtok_a,
  output logic pass_r,
  input  logic pass_a
);

  td_state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TD_P_REQ;
    end else begin
      unique case (state)
        TD_P_REQ:    if (right_ack)  state <= TD_P_RTZ;    // right_req-
        TD_P_RTZ:    if (!right_ack) state <= TD_P_TOK;    // ptok_r+
        TD_P_TOK:    if (ptok_a)     state <= TD_P_TOKRTZ; // ptok_r-
        TD_P_TOKRTZ: if (!ptok_a)    state <= TD_P_PASS;   // pass_r+
        TD_P_PASS:   if (pass_a)     state <= TD_P_PASSRT; // pass_r-
        TD_P_PASSRT: if (!pass_a)    state <= TD_G_REQ;    // right_req+
        TD_G_REQ:    if (right_ack)  state <= TD_G_RTZ;    // right_req-
        TD_G_RTZ:    if (!right_ack) state <= TD_G_TOK;    // gtok_r+
        TD_G_TOK:    if (gtok_a)     state <= TD_G_TOKRTZ; // gtok_r-
        TD_G_TOKRTZ: if (!gtok_a)    state <= TD_G_PASS;   // pass_r+
        TD_G_PASS:   if (pass_a)     state <= TD_G_PASSRT; // pass_r-
        TD_G_PASSRT: if (!pass_a)    state <= TD_P_REQ;    // right_req+
        default:                     state <= TD_P_REQ;
      endcase
    end
  end

  assign right_req = (state == TD_P_REQ)  || (state == TD_G_REQ);
  assign ptok_r    = (state == TD_P_TOK);
  assign gtok_r    = (state == TD_G_TOK);
  assign pass_r    = (state == TD_P_PASS) || (state == TD_G_PASS);

endmodule
