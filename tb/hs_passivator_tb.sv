// Testbench of the passivator handshake component. Random levels on its two
// passive requests a_r and b_r; a reference C-element predicts ack one step
// later. The data must pass straight through. Directed steps first check that
// one request alone is never acknowledged.
module hs_passivator_tb;
  localparam int unsigned WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_r = 1'b0, b_r = 1'b0;
  logic [WIDTH-1:0] d_in = '0, d_out;
  logic ack, ref_ack = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  hs_passivator #(.WIDTH(WIDTH)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (a_r == b_r) ref_ack <= a_r;
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
    a_r = 1'b1; repeat (3) @(negedge clk); chk(!ack, "a alone not acknowledged");
    a_r = 1'b0; b_r = 1'b1; repeat (3) @(negedge clk); chk(!ack, "b alone not acknowledged");
    a_r = 1'b1; @(negedge clk); chk(ack, "both acknowledged");
    b_r = 1'b0; @(negedge clk); chk(ack, "ack holds while a_r high");
    a_r = 1'b0; @(negedge clk); chk(!ack, "ack falls when both low");
    for (int i = 0; i < 4000; i++) begin
      chk(ack == ref_ack, $sformatf("ack at step %0d", i));
      chk(d_out == d_in, "data passes through");
      a_r  = 1'($urandom_range(0, 1));
      b_r  = 1'($urandom_range(0, 1));
      d_in = WIDTH'($urandom);
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
