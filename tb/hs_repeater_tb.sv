// Testbench of the repeater handshake component. After act_r rises the
// repeater must start a new handshake on b one step after the previous one
// has returned to zero, for ever; the testbench answers b after random
// delays and checks each b_r edge is one step after its cause. Before act_r
// rises, and after it falls once the current handshake has finished, b_r must
// stay low.
module hs_repeater_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic act_r = 1'b0, b_a = 1'b0;
  logic b_r;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  hs_repeater dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic hold(input logic exp, input string what);
    int unsigned n;
    n = $urandom_range(0, 3);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      chk(b_r == exp, what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) begin @(negedge clk); chk(!b_r, "no request before activation"); end
    for (int run = 0; run < 20; run++) begin
      act_r = 1'b1;
      @(negedge clk); chk(b_r, "b_r+ one step after act_r");
      for (int c = 0; c < 20; c++) begin
        hold(1'b1, "b_r held until acknowledged");
        b_a = 1'b1; @(negedge clk); chk(!b_r, "b_r- one step after b_a+");
        hold(1'b0, "b_r low until b_a-");
        if (c == 19) act_r = 1'b0;
        b_a = 1'b0; @(negedge clk);
        chk(b_r == (c != 19), "b_r+ one step after b_a- while active");
      end
      repeat (5) begin @(negedge clk); chk(!b_r, "no request once deactivated"); end
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
