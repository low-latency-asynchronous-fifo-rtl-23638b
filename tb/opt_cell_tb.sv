// Testbench of one optimized-protocol cell, with the testbench playing both
// the environment on the put and get buses and the right-hand neighbour
// (pulses on we1 and re1 hand over the PUT and GET tokens). The cell starts
// with both tokens. Each round checks:
//   - a waiting get is not answered while the cell is empty;
//   - latency: put_req+ -> we+ (1 step) -> put_ack+ (2) -> get_ack+ (3);
//   - the get bus is released one step after re falls;
//   - without the PUT token a put is ignored; a we1 pulse enables it;
//   - with the PUT token but valid data a put stalls until the item is read;
//   - early read: after an re1 pulse the item is on the get bus before any
//     get request;
//   - the items read are the items written.
module opt_cell_tb;
  localparam int unsigned WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic put_req = 1'b0, get_req = 1'b0, we1 = 1'b0, re1 = 1'b0;
  logic [WIDTH-1:0] put_data = '0, get_data;
  logic put_ack, get_ack, we, re;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  opt_cell #(.WIDTH(WIDTH), .HAS_TOKENS(1'b1)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input int unsigned n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic pulse(ref logic s);
    s = 1'b1; step(); s = 1'b0; step();
  endtask

  task automatic finish_put();
    while (!put_ack) step();
    put_req = 1'b0;
    while (put_ack) step();
  endtask

  task automatic do_get(input logic [WIDTH-1:0] exp, input string what);
    get_req = 1'b1;
    while (!get_ack) step();
    chk(get_data == exp, $sformatf("%s: read %h expected %h", what, get_data, exp));
    get_req = 1'b0;
    while (get_ack) step();
    step();
    chk(get_data == '0, "get bus released after the get");
  endtask

  initial begin
    logic [WIDTH-1:0] d1, d2, d3;
    step(2);
    rst_n = 1'b1;
    // First round uses the tokens given at reset.
    d1 = WIDTH'($urandom);
    get_req = 1'b1;
    step(5);
    chk(!get_ack, "no get from an empty cell");
    put_data = d1; put_req = 1'b1;
    step(); chk(we && !put_ack && !get_ack, "we one step after put_req");
    step(); chk(put_ack && !get_ack, "put_ack two steps after put_req");
    put_req = 1'b0;
    step(); chk(get_ack && get_data == d1, "latency: get_ack three steps after put_req");
    get_req = 1'b0;
    while (put_ack || get_ack) step();
    step();
    chk(get_data == '0, "get bus released");
    for (int r = 0; r < 100; r++) begin
      d2 = WIDTH'($urandom);
      d3 = WIDTH'($urandom);
      // No PUT token: the put is ignored until a we1 pulse.
      put_data = d2; put_req = 1'b1;
      step(6);
      chk(!put_ack && !we, "put ignored without the PUT token");
      pulse(we1);
      finish_put();
      // PUT token again, but the register is full: the put stalls.
      pulse(we1);
      put_data = d3; put_req = 1'b1;
      step(6);
      chk(!put_ack, "put stalls while the cell holds an item");
      // GET token: early read before any get request.
      pulse(re1);
      step();
      chk(get_data == d2, "early read: item on the bus before get_req");
      fork
        do_get(d2, "first item");
        finish_put();
      join
      pulse(re1);
      do_get(d3, "second item");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
