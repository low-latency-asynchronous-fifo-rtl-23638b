// Testbench of the sequencer handshake component. The testbench is the
// active party on channel a and the passive party on b1 and b2, answering
// after random delays. For every cycle it checks the four-phase sequence
//   a_r+ b1_r+ b1_a+ b1_r- b1_a- b2_r+ b2_a+ b2_r- b2_a- a_a+ a_r- a_a-
// with each output edge exactly one step after the input edge that causes
// it, and no output moving while the testbench waits.
module hs_sequencer_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_r = 1'b0, b1_a = 1'b0, b2_a = 1'b0;
  logic a_a, b1_r, b2_r;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  hs_sequencer dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Wait a random number of steps, checking the outputs hold {a_a,b1_r,b2_r}.
  task automatic hold(input logic [2:0] exp, input string what);
    int unsigned n;
    n = $urandom_range(0, 3);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      chk({a_a, b1_r, b2_r} == exp, $sformatf("outputs hold %s", what));
    end
  endtask

  task automatic expect_next(input logic [2:0] exp, input string what);
    @(negedge clk);
    chk({a_a, b1_r, b2_r} == exp, $sformatf("%s: got %b expected %b", what, {a_a, b1_r, b2_r}, exp));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hold(3'b000, "idle");
    for (int c = 0; c < 300; c++) begin
      a_r  = 1'b1; expect_next(3'b010, "b1_r+"); hold(3'b010, "b1 requested");
      b1_a = 1'b1; expect_next(3'b000, "b1_r-"); hold(3'b000, "b1 returning");
      b1_a = 1'b0; expect_next(3'b001, "b2_r+"); hold(3'b001, "b2 requested");
      b2_a = 1'b1; expect_next(3'b000, "b2_r-"); hold(3'b000, "b2 returning");
      b2_a = 1'b0; expect_next(3'b100, "a_a+");  hold(3'b100, "done");
      a_r  = 1'b0; expect_next(3'b000, "a_a-");  hold(3'b000, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
