// Starter of the base-protocol token-ring FIFO.
//
// A special place in the ring that owns both tokens after reset. The first
// two requests on its passive left channel are simply acknowledged: that puts
// the PUT token and then the GET token into circulation. From then on it
// only relays: for each request on the left channel it performs a request on
// its active right channel, acknowledges on the left once the right side has
// answered, and returns both channels to zero in the same order. The
// eight-state graph is the document's; its clocked form is this model's.
//
// Interface: left_req/left_ack (passive), right_req/right_ack (active).
// Timing: each output responds one clk step after the input that causes it.
module bm_starter
  import tr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic left_req,
  output logic left_ack,
  output logic right_req,
  input  logic right_ack
);

  st_state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_GRANT1;
    end else begin
      unique case (state)
        ST_GRANT1:     if (left_req)   state <= ST_GRANT1_RTZ; // left_ack+
        ST_GRANT1_RTZ: if (!left_req)  state <= ST_GRANT2;     // left_ack-
        ST_GRANT2:     if (left_req)   state <= ST_GRANT2_RTZ; // left_ack+
        ST_GRANT2_RTZ: if (!left_req)  state <= ST_IDLE;       // left_ack-
        ST_IDLE:       if (left_req)   state <= ST_FETCH;      // right_req+
        ST_FETCH:      if (right_ack)  state <= ST_GIVE;       // left_ack+
        ST_GIVE:       if (!left_req)  state <= ST_RELEASE;    // right_req-
        ST_RELEASE:    if (!right_ack) state <= ST_IDLE;       // left_ack-
        default:                       state <= ST_IDLE;
      endcase
    end
  end

  assign left_ack  = (state == ST_GRANT1_RTZ) || (state == ST_GRANT2_RTZ) ||
                     (state == ST_GIVE)       || (state == ST_RELEASE);
  assign right_req = (state == ST_FETCH) || (state == ST_GIVE);

endmodule
