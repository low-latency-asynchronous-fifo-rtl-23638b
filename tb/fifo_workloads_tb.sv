// Runs the four configurations the design was evaluated in, on all three
// FIFOs: 4 and 16 places, each with a fast environment (answers within half a
// clk step) and a slow one (two more steps before each answer). All twelve
// FIFOs run at once, each with its own fifo_driver doing the latency, full, random
// and streaming phases with item-by-item data checks.
// Expected latencies, worked out from the handshakes: the optimized FIFO
// takes 3 steps whatever the size or the environment (put_req+ -> we+ ->
// valid+ -> get_ack+ needs no answer from the environment); the base FIFO
// takes 14 steps plus the environment's delay, because its put handshake
// must return to zero before the GET token can be fetched; the
// handshake-circuit base FIFO takes 37 steps in both environments, because
// its put channel has returned to zero (after the slow environment's two
// extra steps) long before its own transferer and sequencers let the token
// go, so the environment is never on its critical path.
// Also checked: the slow environment streams more slowly than the fast one,
// the optimized FIFO streams faster than the burst-mode base one, and that one
// faster than the handshake-circuit one, in every case.
module fifo_workloads_tb;
  localparam int unsigned WIDTH = 8, STREAM = 64, SLOW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Index: 0 = 4 places fast, 1 = 4 slow, 2 = 16 fast, 3 = 16 slow.
  localparam int unsigned SIZE[4]  = '{4, 4, 16, 16};
  localparam int unsigned DELAY[4] = '{0, SLOW, 0, SLOW};
  localparam string       NAME[4]  = '{"E4F", "E4S", "E16F", "E16S"};

  int unsigned opt_lat[4], bm_lat[4], hs_lat[4], opt_cyc[4], bm_cyc[4], hs_cyc[4];
  int unsigned sub_checks[12] = '{default: 0}, sub_fail[12];

  for (genvar k = 0; k < 4; k++) begin : g_cfg
    logic op_req, op_ack, og_req, og_ack, bp_req, bp_ack, bg_req, bg_ack;
    logic hp_req, hp_ack, hg_req, hg_ack;
    logic [WIDTH-1:0] op_d, og_d, bp_d, bg_d, hp_d, hg_d;

    opt_fifo #(.N(SIZE[k]), .WIDTH(WIDTH)) u_opt (
      .clk, .rst_n, .put_req(op_req), .put_data(op_d), .put_ack(op_ack),
      .get_req(og_req), .get_data(og_d), .get_ack(og_ack));
    fifo_driver #(.N(SIZE[k]), .WIDTH(WIDTH), .EXP_LATENCY(3), .ITEMS(150),
                  .STREAM(STREAM), .SEED(20 + k), .ENV_DELAY(DELAY[k])) u_opt_drv (
      .clk, .put_req(op_req), .put_data(op_d), .put_ack(op_ack),
      .get_req(og_req), .get_data(og_d), .get_ack(og_ack));

    bm_fifo #(.N(SIZE[k]), .WIDTH(WIDTH)) u_bm (
      .clk, .rst_n, .put_req(bp_req), .put_data(bp_d), .put_ack(bp_ack),
      .get_req(bg_req), .get_data(bg_d), .get_ack(bg_ack));
    fifo_driver #(.N(SIZE[k]), .WIDTH(WIDTH), .EXP_LATENCY(14 + DELAY[k]), .ITEMS(150),
                  .STREAM(STREAM), .SEED(40 + k), .ENV_DELAY(DELAY[k])) u_bm_drv (
      .clk, .put_req(bp_req), .put_data(bp_d), .put_ack(bp_ack),
      .get_req(bg_req), .get_data(bg_d), .get_ack(bg_ack));

    hs_fifo #(.N(SIZE[k]), .WIDTH(WIDTH)) u_hs (
      .clk, .rst_n, .put_req(hp_req), .put_data(hp_d), .put_ack(hp_ack),
      .get_req(hg_req), .get_data(hg_d), .get_ack(hg_ack));
    fifo_driver #(.N(SIZE[k]), .WIDTH(WIDTH), .EXP_LATENCY(37), .ITEMS(150),
                  .STREAM(STREAM), .SEED(60 + k), .ENV_DELAY(DELAY[k])) u_hs_drv (
      .clk, .put_req(hp_req), .put_data(hp_d), .put_ack(hp_ack),
      .get_req(hg_req), .get_data(hg_d), .get_ack(hg_ack));

    initial begin
      @(posedge rst_n);
      fork
        u_opt_drv.run();
        u_bm_drv.run();
        u_hs_drv.run();
      join
      hs_lat[k]  = u_hs_drv.latency;
      hs_cyc[k]  = u_hs_drv.stream_steps;
      sub_checks[8+k] = u_hs_drv.checks;
      sub_fail[8+k]   = u_hs_drv.failures;
      opt_lat[k] = u_opt_drv.latency;
      bm_lat[k]  = u_bm_drv.latency;
      opt_cyc[k] = u_opt_drv.stream_steps;
      bm_cyc[k]  = u_bm_drv.stream_steps;
      sub_checks[2*k]   = u_opt_drv.checks;
      sub_fail[2*k]     = u_opt_drv.failures;
      sub_checks[2*k+1] = u_bm_drv.checks;
      sub_fail[2*k+1]   = u_bm_drv.failures;
    end
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
    wait (g_cfg[0].u_opt_drv.ref_q.size() == 0 && sub_checks[0] != 0 && sub_checks[1] != 0 &&
          sub_checks[2] != 0 && sub_checks[3] != 0 && sub_checks[4] != 0 && sub_checks[5] != 0 &&
          sub_checks[6] != 0 && sub_checks[7] != 0 && sub_checks[8] != 0 && sub_checks[9] != 0 &&
          sub_checks[10] != 0 && sub_checks[11] != 0);
    for (int k = 0; k < 12; k++) begin
      checks   += sub_checks[k];
      failures += sub_fail[k];
    end
    $display("config  opt latency  opt steps/item  base latency  base steps/item  hs latency  hs steps/item");
    for (int k = 0; k < 4; k++)
      $display("%-6s  %11d  %14.2f  %12d  %15.2f  %10d  %13.2f", NAME[k], opt_lat[k],
               real'(opt_cyc[k]) / STREAM, bm_lat[k], real'(bm_cyc[k]) / STREAM,
               hs_lat[k], real'(hs_cyc[k]) / STREAM);
    for (int k = 0; k < 4; k++) begin
      need(opt_cyc[k] < bm_cyc[k], $sformatf("%s: optimized not faster than base", NAME[k]));
      need(bm_cyc[k] < hs_cyc[k], $sformatf("%s: burst-mode not faster than handshake circuit", NAME[k]));
    end
    need(opt_cyc[1] > opt_cyc[0] && opt_cyc[3] > opt_cyc[2], "slow environment not slower (optimized)");
    need(bm_cyc[1] > bm_cyc[0] && bm_cyc[3] > bm_cyc[2], "slow environment not slower (base)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
