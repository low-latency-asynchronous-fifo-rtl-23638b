// Testbench of the token-ring FIFO built from handshake-circuit cells, at 16
// places. fifo_driver runs latency, full, random and streaming phases and
// compares every item with a reference queue. The latency through the empty
// FIFO just after start-up is 37 steps, worked out by following every
// component's handshakes one step at a time with an environment that answers
// within half a step: put accepted and pulled by the transferer (1-2), write
// acknowledged and the transfer completed (3-8), left handshake passing the
// PUT token (9-16), the sequencers unwinding to the get half (17-24), right
// handshake with the Starter for the GET token (25-31), then the transferer
// pulls from the register and pushes to the get bus (32-37). The handshake
// cell is slower in steps than the burst-mode one because every component
// adds a step. It also counts the Starter's relays and the PUT token's
// returns to cell 0, which must both occur.
module hs_fifo_tb;
  localparam int unsigned N = 16, WIDTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic put_req, put_ack, get_req, get_ack;
  logic [WIDTH-1:0] put_data, get_data;
  int unsigned checks = 0, failures = 0;
  int unsigned relays = 0, wraps = 0;

  always #5 clk = ~clk;

  hs_fifo #(.N(N), .WIDTH(WIDTH)) dut (.*);

  fifo_driver #(.N(N), .WIDTH(WIDTH), .EXP_LATENCY(37), .ITEMS(300), .STREAM(64), .SEED(11)) drv (.*);

  logic fetch_q = 1'b0, w0_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_starter.right_req && !fetch_q) relays++;
    if (dut.g_cell[0].u_cell.t1_r && !w0_q) wraps++;
    fetch_q <= dut.u_starter.right_req;
    w0_q    <= dut.g_cell[0].u_cell.t1_r;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drv.run();
    checks   = drv.checks;
    failures = drv.failures;
    $display("latency=%0d steps, stream %0d items in %0d steps, full stalls=%0d empty waits=%0d",
             drv.latency, 64, drv.stream_steps, drv.full_stalls, drv.empty_waits);
    $display("starter relays=%0d wraps=%0d", relays, wraps);
    checks += 4;
    if (drv.full_stalls == 0) begin failures++; $display("FAIL: no full stall"); end
    if (drv.empty_waits == 0) begin failures++; $display("FAIL: no empty wait"); end
    if (relays == 0)          begin failures++; $display("FAIL: no Starter relay"); end
    if (wraps < 2)            begin failures++; $display("FAIL: PUT token did not wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
