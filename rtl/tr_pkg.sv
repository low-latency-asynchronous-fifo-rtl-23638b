// Shared state encodings for the token-ring FIFO controllers.
//
// Every asynchronous controller of the two FIFOs is modelled as a unit-delay
// machine: its state register moves at most once per step of the model clock,
// so an input change is answered one step later. The encodings below follow
// the burst-mode state graphs of the two designs; the names are this model's
// own, the transitions are those of the state graphs.
package tr_pkg;

  // Obtain-token machines of the optimized cell (OPT and OGT), four states each:
  // wait for the neighbour's enable to rise, wait for it to fall, token held,
  // token being used (for OPT the token is already released in this state).
  typedef enum logic [1:0] {
    TOK_WAIT_RISE = 2'd0,
    TOK_WAIT_FALL = 2'd1,
    TOK_HELD      = 2'd2,
    TOK_IN_USE    = 2'd3
  } tok_state_t;

  // Token distributor of the base-protocol cell: twelve states, one per arc of
  // its state graph. The first six handle the PUT token, the last six the GET token.
  typedef enum logic [3:0] {
    TD_P_REQ    = 4'd0,   // right_req high, waiting right_ack+
    TD_P_RTZ    = 4'd1,   // waiting right_ack-
    TD_P_TOK    = 4'd2,   // ptok_r high, waiting ptok_a+
    TD_P_TOKRTZ = 4'd3,   // waiting ptok_a-
    TD_P_PASS   = 4'd4,   // pass_r high, waiting pass_a+
    TD_P_PASSRT = 4'd5,   // waiting pass_a-
    TD_G_REQ    = 4'd6,
    TD_G_RTZ    = 4'd7,
    TD_G_TOK    = 4'd8,
    TD_G_TOKRTZ = 4'd9,
    TD_G_PASS   = 4'd10,
    TD_G_PASSRT = 4'd11
  } td_state_t;

  // Starter of the base-protocol ring: two token grants, then a relay loop.
  typedef enum logic [2:0] {
    ST_GRANT1     = 3'd0,
    ST_GRANT1_RTZ = 3'd1,
    ST_GRANT2     = 3'd2,
    ST_GRANT2_RTZ = 3'd3,
    ST_IDLE       = 3'd4,  // waiting left_req+
    ST_FETCH      = 3'd5,  // right_req high, waiting right_ack+
    ST_GIVE       = 3'd6,  // left_ack high, waiting left_req-
    ST_RELEASE    = 3'd7   // right_req low, waiting right_ack-
  } st_state_t;

  // Handshake components of the handshake-circuit cell.
  // Sequencer: handshake on its first active port, then on its second, then
  // acknowledge its passive port.
  typedef enum logic [2:0] {
    SEQ_IDLE   = 3'd0,
    SEQ_FIRST  = 3'd1,  // b1_r high, waiting b1_a+
    SEQ_FIRST0 = 3'd2,  // waiting b1_a-
    SEQ_SECOND = 3'd3,  // b2_r high, waiting b2_a+
    SEQ_SECND0 = 3'd4,  // waiting b2_a-
    SEQ_DONE   = 3'd5   // a_a high, waiting a_r-
  } seq_state_t;

  // Transferer: pull a value, push it, acknowledge, return to zero.
  typedef enum logic [2:0] {
    TR_IDLE = 3'd0,
    TR_PULL = 3'd1,     // i_r high, waiting i_a+
    TR_PUSH = 3'd2,     // i_r and o_r high, waiting o_a+
    TR_DONE = 3'd3,     // a_a high, waiting a_r-
    TR_RTZ  = 3'd4      // i_r and o_r low, waiting i_a- and o_a-
  } tr_state_t;

  // Call (MUX): one of several passive ports is relayed to the active port.
  typedef enum logic [1:0] {
    CALL_IDLE = 2'd0,
    CALL_REQ  = 2'd1,   // o_r high, waiting o_a+
    CALL_ACK  = 2'd2,   // selected a_a high, waiting its a_r-
    CALL_RTZ  = 2'd3    // o_r low, waiting o_a-
  } call_state_t;

endpackage
