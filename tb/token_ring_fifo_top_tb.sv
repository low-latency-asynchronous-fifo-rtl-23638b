// End-to-end testbench of the top level with every parameter at its default
// (4 places, 8 bits). All three FIFOs run at once, each from its own
// fifo_driver: latency through the empty FIFO (3 clk steps for the optimized
// FIFO, 14 for the burst-mode base one, 37 for the handshake-circuit base
// one, all worked out by hand from the handshakes), a put that
// stalls on a full FIFO, random traffic checked item by item, and streaming.
// It counts every mechanism the two designs have and fails if one never
// happened: full stall and empty wait (both), early read enable, overlap of
// a cell's get with its own put return-to-zero and token wrap-around
// (optimized), Starter relay and token wrap-around (both base FIFOs).
// Finally it checks that the optimized FIFO streams faster than the
// burst-mode base one, and that one faster than the handshake-circuit one.
module token_ring_fifo_top_tb;
  localparam int unsigned N = 4, WIDTH = 8, STREAM = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic opt_put_req, opt_put_ack, opt_get_req, opt_get_ack;
  logic bm_put_req, bm_put_ack, bm_get_req, bm_get_ack;
  logic hs_put_req, hs_put_ack, hs_get_req, hs_get_ack;
  logic [WIDTH-1:0] opt_put_data, opt_get_data, bm_put_data, bm_get_data;
  logic [WIDTH-1:0] hs_put_data, hs_get_data;
  int unsigned checks = 0, failures = 0;
  int unsigned early_reads = 0, overlaps = 0, opt_wraps = 0, relays = 0, bm_wraps = 0;
  int unsigned hs_relays = 0, hs_wraps = 0;

  always #5 clk = ~clk;

  token_ring_fifo_top dut (.*);

  fifo_driver #(.N(N), .WIDTH(WIDTH), .EXP_LATENCY(3), .ITEMS(400), .STREAM(STREAM), .SEED(3)) drv_opt (
    .clk,
    .put_req (opt_put_req), .put_data (opt_put_data), .put_ack (opt_put_ack),
    .get_req (opt_get_req), .get_data (opt_get_data), .get_ack (opt_get_ack)
  );

  fifo_driver #(.N(N), .WIDTH(WIDTH), .EXP_LATENCY(14), .ITEMS(400), .STREAM(STREAM), .SEED(5)) drv_bm (
    .clk,
    .put_req (bm_put_req), .put_data (bm_put_data), .put_ack (bm_put_ack),
    .get_req (bm_get_req), .get_data (bm_get_data), .get_ack (bm_get_ack)
  );

  fifo_driver #(.N(N), .WIDTH(WIDTH), .EXP_LATENCY(37), .ITEMS(400), .STREAM(STREAM), .SEED(7)) drv_hs (
    .clk,
    .put_req (hs_put_req), .put_data (hs_put_data), .put_ack (hs_put_ack),
    .get_req (hs_get_req), .get_data (hs_get_data), .get_ack (hs_get_ack)
  );

  logic [N-1:0] we_v, wa_v, re_v, ra_v;
  for (genvar i = 0; i < N; i++) begin : g_probe
    assign we_v[i] = dut.u_opt.g_cell[i].u_cell.we;
    assign wa_v[i] = dut.u_opt.g_cell[i].u_cell.put_ack;
    assign re_v[i] = dut.u_opt.g_cell[i].u_cell.re;
    assign ra_v[i] = dut.u_opt.g_cell[i].u_cell.ra;
  end

  logic we0_q = 1'b0, fetch_q = 1'b0, pa0_q = 1'b0, hs_fetch_q = 1'b0, hs_t0_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (|(ra_v & ~re_v) && !opt_get_req) early_reads++;
    if (|(re_v & (we_v | wa_v))) overlaps++;
    if (we_v[0] && !we0_q) opt_wraps++;
    if (dut.u_bm.u_starter.right_req && !fetch_q) relays++;
    if (dut.u_bm.g_cell[0].u_cell.ptok_a && !pa0_q) bm_wraps++;
    if (dut.u_hs.u_starter.right_req && !hs_fetch_q) hs_relays++;
    if (dut.u_hs.g_cell[0].u_cell.t1_r && !hs_t0_q) hs_wraps++;
    hs_fetch_q <= dut.u_hs.u_starter.right_req;
    hs_t0_q    <= dut.u_hs.g_cell[0].u_cell.t1_r;
    we0_q   <= we_v[0];
    fetch_q <= dut.u_bm.u_starter.right_req;
    pa0_q   <= dut.u_bm.g_cell[0].u_cell.ptok_a;
  end

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      drv_opt.run();
      drv_bm.run();
      drv_hs.run();
    join
    checks   = drv_opt.checks + drv_bm.checks + drv_hs.checks;
    failures = drv_opt.failures + drv_bm.failures + drv_hs.failures;
    $display("optimized: latency=%0d, %0d items streamed in %0d steps, full stalls=%0d empty waits=%0d",
             drv_opt.latency, STREAM, drv_opt.stream_steps, drv_opt.full_stalls, drv_opt.empty_waits);
    $display("optimized: early reads=%0d overlaps=%0d wraps=%0d", early_reads, overlaps, opt_wraps);
    $display("base:      latency=%0d, %0d items streamed in %0d steps, full stalls=%0d empty waits=%0d",
             drv_bm.latency, STREAM, drv_bm.stream_steps, drv_bm.full_stalls, drv_bm.empty_waits);
    $display("base:      starter relays=%0d wraps=%0d", relays, bm_wraps);
    $display("handshake: latency=%0d, %0d items streamed in %0d steps, full stalls=%0d empty waits=%0d",
             drv_hs.latency, STREAM, drv_hs.stream_steps, drv_hs.full_stalls, drv_hs.empty_waits);
    $display("handshake: starter relays=%0d wraps=%0d", hs_relays, hs_wraps);
    need(drv_opt.full_stalls > 0, "optimized FIFO never stalled a put when full");
    need(drv_opt.empty_waits > 0, "optimized FIFO never held a get when empty");
    need(early_reads > 0,         "no early read enable");
    need(overlaps > 0,            "no get overlapping a put return-to-zero");
    need(opt_wraps >= 2,          "optimized PUT token did not wrap around");
    need(drv_bm.full_stalls > 0,  "base FIFO never stalled a put when full");
    need(drv_bm.empty_waits > 0,  "base FIFO never held a get when empty");
    need(relays > 0,              "Starter never relayed a token");
    need(bm_wraps >= 2,           "base PUT token did not wrap around");
    need(drv_hs.full_stalls > 0,  "handshake FIFO never stalled a put when full");
    need(drv_hs.empty_waits > 0,  "handshake FIFO never held a get when empty");
    need(hs_relays > 0,           "handshake Starter never relayed a token");
    need(hs_wraps >= 2,           "handshake PUT token did not wrap around");
    need(drv_opt.stream_steps < drv_bm.stream_steps, "optimized FIFO not faster than base FIFO");
    need(drv_bm.stream_steps < drv_hs.stream_steps, "burst-mode base FIFO not faster than handshake one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
