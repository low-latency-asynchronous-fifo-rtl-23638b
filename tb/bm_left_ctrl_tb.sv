// Testbench of the base cell's Left Controller. Random levels on left_req
// and pass_r; a reference C-element predicts ack after every step. Directed
// steps first check that a neighbour's request is not answered until a token
// is ready to pass.
module bm_left_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic left_req = 1'b0, pass_r = 1'b0;
  logic ack, ref_ack = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  bm_left_ctrl dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (left_req == pass_r) ref_ack <= left_req;
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
    left_req = 1'b1; @(negedge clk); @(negedge clk); chk(!ack, "no answer without a token to pass");
    pass_r = 1'b1; @(negedge clk); chk(ack, "token passed");
    left_req = 1'b0; @(negedge clk); chk(ack, "ack holds");
    pass_r = 1'b0; @(negedge clk); chk(!ack, "ack falls when both low");
    for (int i = 0; i < 4000; i++) begin
      chk(ack == ref_ack, $sformatf("step %0d", i));
      left_req = 1'($urandom_range(0, 1));
      pass_r   = 1'($urandom_range(0, 1));
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
