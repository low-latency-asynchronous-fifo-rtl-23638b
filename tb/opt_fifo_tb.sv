// Testbench of the optimized token-ring FIFO at 16 places, the larger of the
// two capacities the design was evaluated at. fifo_driver runs latency,
// full, random and streaming phases and compares every item with a
// reference queue. The latency through the empty FIFO must be 3 clk steps
// (write enable, valid, read enable) whatever the capacity. The testbench also
// counts the mechanisms of the optimized protocol, each of which must occur:
// early read (a cell's register answers the read request before any get
// request), overlap (a cell's read enable is high while its own put handshake
// is still returning to zero) and token wrap-around (the PUT token returns to cell 0).
module opt_fifo_tb;
  localparam int unsigned N = 16, WIDTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic put_req, put_ack, get_req, get_ack;
  logic [WIDTH-1:0] put_data, get_data;
  int unsigned checks = 0, failures = 0;
  int unsigned early_reads = 0, overlaps = 0, wraps = 0;

  always #5 clk = ~clk;

  opt_fifo #(.N(N), .WIDTH(WIDTH)) dut (.*);

  fifo_driver #(.N(N), .WIDTH(WIDTH), .EXP_LATENCY(3), .ITEMS(300), .STREAM(64), .SEED(7)) drv (.*);

  // Mechanism counters, from the cells' internal handshake signals.
  logic [N-1:0] we_v, wa_v, re_v, ra_v;
  for (genvar i = 0; i < N; i++) begin : g_probe
    assign we_v[i] = dut.g_cell[i].u_cell.we;
    assign wa_v[i] = dut.g_cell[i].u_cell.put_ack;
    assign re_v[i] = dut.g_cell[i].u_cell.re;
    assign ra_v[i] = dut.g_cell[i].u_cell.ra;
  end
  logic we0_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (|(ra_v & ~re_v) && !get_req) early_reads++;
    if (|(re_v & (we_v | wa_v))) overlaps++;
    if (we_v[0] && !we0_q) wraps++;
    we0_q <= we_v[0];
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drv.run();
    checks   = drv.checks;
    failures = drv.failures;
    $display("latency=%0d steps, stream %0d items in %0d steps, full stalls=%0d empty waits=%0d",
             drv.latency, 64, drv.stream_steps, drv.full_stalls, drv.empty_waits);
    $display("early reads=%0d overlaps=%0d wraps=%0d", early_reads, overlaps, wraps);
    checks += 5;
    if (drv.full_stalls == 0) begin failures++; $display("FAIL: no full stall"); end
    if (drv.empty_waits == 0) begin failures++; $display("FAIL: no empty wait"); end
    if (early_reads == 0)     begin failures++; $display("FAIL: no early read"); end
    if (overlaps == 0)        begin failures++; $display("FAIL: no put/get overlap"); end
    if (wraps < 2)            begin failures++; $display("FAIL: PUT token did not wrap"); end
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
