// Test environment for one token-ring FIFO: drives its passive put and get
// channels as four-phase bundled-data handshakes and checks what comes out.
//
// All inputs are driven on the falling clk edge, and the FIFO's outputs are
// sampled there, so the environment answers every FIFO event within half a
// step (the "fast environment"); ENV_DELAY adds that many whole steps before
// each answer to an acknowledge (a "slow environment"). run() performs, in
// order:
//   1. latency: a get request waits on the empty FIFO, one item is put, and
//      the number of rising clk edges from the first one that sees put_req
//      to the one that raises get_ack must equal EXP_LATENCY;
//   2. full: N items are put with no get, a further put must not be
//      acknowledged while the FIFO is full, and completes after one get;
//   3. random traffic: ITEMS items through concurrent put and get processes
//      with random pauses, each checked in order against a reference queue;
//   4. streaming: STREAM items with no pauses on either side, measuring the
//      clk steps per item.
// Results are left in checks, failures and the counters below.
module fifo_driver #(
  parameter int unsigned N           = 4,
  parameter int unsigned WIDTH       = 8,
  parameter int unsigned EXP_LATENCY = 3,
  parameter int unsigned ITEMS       = 200,
  parameter int unsigned STREAM      = 64,
  parameter int unsigned SEED        = 1,
  parameter int unsigned ENV_DELAY   = 0
) (
  input  logic             clk,
  output logic             put_req,
  output logic [WIDTH-1:0] put_data,
  input  logic             put_ack,
  output logic             get_req,
  input  logic [WIDTH-1:0] get_data,
  input  logic             get_ack
);

  int unsigned checks = 0, failures = 0;
  int unsigned full_stalls = 0, empty_waits = 0, items_out = 0;
  int unsigned latency = 0, stream_steps = 0;
  logic [WIDTH-1:0] ref_q[$];
  int unsigned rng;
  int unsigned step = 0;   // falling clk edges seen

  always @(negedge clk) step++;

  initial begin
    put_req  = 1'b0;
    get_req  = 1'b0;
    put_data = '0;
    rng      = SEED;
  end

  function automatic int unsigned next_rand();
    rng = rng * 32'd1103515245 + 32'd12345;
    return rng >> 8;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_put(input logic [WIDTH-1:0] d);
    @(negedge clk);
    put_data = d;
    put_req  = 1'b1;
    do @(negedge clk); while (!put_ack);
    ref_q.push_back(d);
    repeat (ENV_DELAY) @(negedge clk);
    put_req = 1'b0;
    do @(negedge clk); while (put_ack);
    repeat (ENV_DELAY) @(negedge clk);
  endtask

  task automatic do_get();
    logic [WIDTH-1:0] exp;
    @(negedge clk);
    get_req = 1'b1;
    do @(negedge clk); while (!get_ack);
    if (ref_q.size() == 0) begin
      check(1'b0, "get acknowledged on an empty FIFO");
    end else begin
      exp = ref_q.pop_front();
      check(get_data == exp, $sformatf("get data %h, expected %h", get_data, exp));
    end
    items_out++;
    repeat (ENV_DELAY) @(negedge clk);
    get_req = 1'b0;
    do @(negedge clk); while (get_ack);
    repeat (ENV_DELAY) @(negedge clk);
  endtask

  task automatic pause(input int unsigned max_steps);
    int unsigned n;
    n = next_rand() % (max_steps + 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic run();
    int unsigned t0;
    logic [WIDTH-1:0] d;

    // 1. Latency through the empty FIFO.
    @(negedge clk);
    get_req = 1'b1;
    repeat (20) @(negedge clk);
    check(!get_ack, "get acknowledged before any put");
    empty_waits++;
    put_data = WIDTH'(8'hA5);
    put_req  = 1'b1;
    latency  = 0;
    t0 = 0;
    do begin
      @(negedge clk);
      latency++;
      if (put_ack && t0++ == ENV_DELAY) put_req = 1'b0;
    end while (!get_ack && latency < 1000);
    check(latency == EXP_LATENCY,
          $sformatf("latency %0d steps, expected %0d", latency, EXP_LATENCY));
    check(get_data == WIDTH'(8'hA5), "latency item data");
    // Finish both handshakes.
    while (put_req && !put_ack) @(negedge clk);
    put_req = 1'b0;
    get_req = 1'b0;
    while (put_ack || get_ack) @(negedge clk);

    // 2. Fill to capacity, then one more put must stall.
    for (int i = 0; i < int'(N); i++) do_put(WIDTH'(next_rand()));
    @(negedge clk);
    d        = WIDTH'(next_rand());
    put_data = d;
    put_req  = 1'b1;
    repeat (50) @(negedge clk);
    check(!put_ack, "put acknowledged on a full FIFO");
    if (!put_ack) full_stalls++;
    fork
      begin
        do @(negedge clk); while (!put_ack);
        repeat (ENV_DELAY) @(negedge clk);
        put_req = 1'b0;
        do @(negedge clk); while (put_ack);
      end
      do_get();
    join
    ref_q.push_back(d);
    while (ref_q.size() != 0) do_get();

    // 3. Random traffic.
    fork
      for (int i = 0; i < int'(ITEMS); i++) begin
        pause(6);
        do_put(WIDTH'(next_rand()));
      end
      for (int i = 0; i < int'(ITEMS); i++) begin
        pause(6);
        if (ref_q.size() == 0) empty_waits++;
        if (ref_q.size() >= N) full_stalls++;
        do_get();
      end
    join

    // 4. Streaming, no pauses.
    t0 = step;
    fork
      for (int i = 0; i < int'(STREAM); i++) do_put(WIDTH'(next_rand()));
      for (int i = 0; i < int'(STREAM); i++) do_get();
    join
    stream_steps = step - t0;
    check(ref_q.size() == 0, "reference queue empty at the end");
  endtask

endmodule
