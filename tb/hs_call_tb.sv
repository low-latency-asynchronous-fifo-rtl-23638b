// Testbench of the call (mixer) handshake component with three callers. Each
// cycle one randomly chosen caller requests; the testbench is the passive
// party on the shared output channel and answers after random delays. It
// checks o_r+ one step after the caller's request, that only the chosen
// caller is acknowledged, one step after o_a+, that the output returns to
// zero one step after the caller's request falls, and that the caller's
// acknowledge falls one step after o_a-.
module hs_call_tb;
  localparam int unsigned M = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] a_r = '0;
  logic [M-1:0] a_a;
  logic o_a = 1'b0;
  logic o_r;
  int unsigned checks = 0, failures = 0;
  int unsigned used [M] = '{default: 0};

  always #5 clk = ~clk;

  hs_call #(.M(M)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic hold(input logic [M:0] exp, input string what);
    int unsigned n;
    n = $urandom_range(0, 3);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      chk({o_r, a_a} == exp, $sformatf("outputs hold %s", what));
    end
  endtask

  task automatic expect_next(input logic [M:0] exp, input string what);
    @(negedge clk);
    chk({o_r, a_a} == exp, $sformatf("%s: got %b expected %b", what, {o_r, a_a}, exp));
  endtask

  initial begin
    int unsigned k;
    logic [M-1:0] one;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hold('0, "idle");
    for (int c = 0; c < 400; c++) begin
      k = $urandom_range(0, M - 1);
      used[k]++;
      one = M'(1) << k;
      a_r = one;   expect_next({1'b1, M'(0)}, "o_r+");  hold({1'b1, M'(0)}, "calling");
      o_a = 1'b1;  expect_next({1'b1, one}, "a_a[k]+"); hold({1'b1, one}, "acknowledged");
      a_r = '0;    expect_next({1'b0, one}, "o_r-");    hold({1'b0, one}, "returning");
      o_a = 1'b0;  expect_next({1'b0, M'(0)}, "a_a[k]-");
      hold('0, "idle");
    end
    for (int i = 0; i < M; i++) chk(used[i] > 0, $sformatf("caller %0d exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
