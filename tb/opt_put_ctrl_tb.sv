// Testbench of the optimized cell's Put Controller. Random levels on put_req,
// ptok and valid for many steps; a reference asymmetric C-element (set on all
// of put_req, ptok and !valid, reset on !put_req and !ptok, else hold)
// predicts we after every step. Directed steps first check that valid high
// blocks a write and that we holds while only one of put_req and ptok falls.
module opt_put_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic put_req = 1'b0, ptok = 1'b0, valid = 1'b0;
  logic we, ref_we = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  opt_put_ctrl dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (put_req && ptok && !valid) ref_we <= 1'b1;
    else if (!put_req && !ptok)    ref_we <= 1'b0;
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
    put_req = 1'b1; ptok = 1'b1; valid = 1'b1; @(negedge clk); chk(!we, "valid blocks the write");
    valid = 1'b0; @(negedge clk); chk(we, "write one step after all inputs true");
    ptok = 1'b0; valid = 1'b1; @(negedge clk); chk(we, "we holds while put_req is high");
    put_req = 1'b0; @(negedge clk); chk(!we, "we falls with put_req and ptok low");
    for (int i = 0; i < 4000; i++) begin
      chk(we == ref_we, $sformatf("step %0d", i));
      put_req = 1'($urandom_range(0, 1));
      ptok    = 1'($urandom_range(0, 1));
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
