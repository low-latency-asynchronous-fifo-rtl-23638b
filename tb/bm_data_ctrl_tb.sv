// Testbench of the base cell's Put/Get Controller. Random levels on req and
// tok_r; a reference C-element (rises when both are high, falls when both
// are low, else holds) predicts ack after every step. Directed steps first
// check that a request without the token gets no answer.
module bm_data_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, tok_r = 1'b0;
  logic ack, ref_ack = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  bm_data_ctrl dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (req == tok_r) ref_ack <= req;
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
    req = 1'b1; @(negedge clk); @(negedge clk); chk(!ack, "no answer without the token");
    req = 1'b0; @(negedge clk); tok_r = 1'b1; @(negedge clk); chk(!ack, "no answer without a request");
    req = 1'b1; @(negedge clk); chk(ack, "answer with both");
    tok_r = 1'b0; @(negedge clk); chk(ack, "ack holds");
    req = 1'b0; @(negedge clk); chk(!ack, "ack falls when both low");
    for (int i = 0; i < 4000; i++) begin
      chk(ack == ref_ack, $sformatf("step %0d", i));
      req   = 1'($urandom_range(0, 1));
      tok_r = 1'($urandom_range(0, 1));
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
