// Testbench of the optimized cell's Get Controller. Random levels on get_req,
// ra and valid; a reference asymmetric C-element (reset whenever get_req is
// low, set on get_req, ra and valid together, else hold) predicts re after
// every step. Directed steps first check that an empty register blocks the
// read and that re holds when ra and valid fall while get_req stays high.
module opt_get_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic get_req = 1'b0, ra = 1'b0, valid = 1'b0;
  logic re, ref_re = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  opt_get_ctrl dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (!get_req)          ref_re <= 1'b0;
    else if (ra && valid)  ref_re <= 1'b1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    get_req = 1'b1; ra = 1'b1; valid = 1'b0; @(negedge clk); chk(!re, "empty register blocks the read");
    valid = 1'b1; @(negedge clk); chk(re, "read one step after all inputs true");
    ra = 1'b0; valid = 1'b0; @(negedge clk); chk(re, "re holds while get_req is high");
    get_req = 1'b0; @(negedge clk); chk(!re, "re falls with get_req");
    for (int i = 0; i < 4000; i++) begin
      chk(re == ref_re, $sformatf("step %0d", i));
      get_req = 1'($urandom_range(0, 1));
      ra      = 1'($urandom_range(0, 1));
      valid   = 1'($urandom_range(0, 1));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
