// Testbench of the base-protocol cell built from handshake components, with
// the testbench playing the environment on the put and get buses, the right-hand neighbour (it grants
// a token by answering the cell's right_req) and the left-hand neighbour (it
// takes a token by a handshake on the cell's left channel). Each round
// checks the base protocol's strict order: a put is not answered before the
// PUT token is granted; the left neighbour cannot take the token before the
// put is complete; a get is not answered before the cell has passed the PUT
// token and been granted the GET token; the item read is the item written;
// and the cell asks for the next token only after passing the current one.
// The waits before the "asks for the token" checks (12 and 16 steps) cover
// the sequencer chain between one channel and the next: 9 and 14 steps,
// counted component by component.
module hs_cell_tb;
  localparam int unsigned WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic put_req = 1'b0, get_req = 1'b0, right_ack = 1'b0, left_req = 1'b0;
  logic [WIDTH-1:0] put_data = '0, get_data;
  logic put_ack, get_ack, right_req, left_ack;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  hs_cell #(.WIDTH(WIDTH)) dut (.*);

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

  task automatic grant();
    while (!right_req) step();
    right_ack = 1'b1;
    while (right_req) step();
    right_ack = 1'b0;
    step();
  endtask

  task automatic take();
    left_req = 1'b1;
    while (!left_ack) step();
    left_req = 1'b0;
    while (left_ack) step();
  endtask

  initial begin
    logic [WIDTH-1:0] d;
    step(2);
    rst_n = 1'b1;
    for (int r = 0; r < 100; r++) begin
      d = WIDTH'($urandom);
      // Put and get requests and a left request all wait for the PUT token.
      put_data = d; put_req = 1'b1; get_req = 1'b1; left_req = 1'b1;
      step(6);
      chk(right_req, "cell asks for the PUT token");
      chk(!put_ack && !get_ack && !left_ack, "nothing happens without a token");
      grant();
      while (!put_ack) step();
      chk(!left_ack && !get_ack, "put completes first");
      put_req = 1'b0;
      while (put_ack) step();
      // The left neighbour takes the PUT token.
      while (!left_ack) step();
      chk(!get_ack, "no get while passing the PUT token");
      left_req = 1'b0;
      while (left_ack) step();
      step(12);
      chk(!get_ack, "no get before the GET token");
      chk(right_req, "cell asks for the GET token");
      grant();
      while (!get_ack) step();
      chk(get_data == d, $sformatf("read %h expected %h", get_data, d));
      get_req = 1'b0;
      while (get_ack) step();
      step(3);
      chk(!right_req, "no new request before the GET token is passed");
      take();
      step(16);
      chk(right_req, "cell asks for the next PUT token");
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
