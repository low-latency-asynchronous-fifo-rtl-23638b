// Testbench of the optimized cell's DataValid element. Random levels on we
// and re; a reference of its event order (valid rises one step after we is
// seen high, then falls one step after re has been seen high and then low)
// predicts valid after every step. Directed steps first check that valid
// does not fall while re is still high.
module opt_data_valid_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic valid;
  int unsigned ph = 0;  // 0 empty, 1 valid, 2 valid and re seen
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  opt_data_valid dut (.*);

  always @(posedge clk) if (rst_n) begin
    case (ph)
      0: if (we)  ph <= 1;
      1: if (re)  ph <= 2;
      default: if (!re) ph <= 0;
    endcase
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
    we = 1'b1; @(negedge clk); chk(valid, "valid one step after we+");
    we = 1'b0; re = 1'b1; @(negedge clk); chk(valid, "valid kept while re is high");
    @(negedge clk); chk(valid, "valid kept while re is high");
    re = 1'b0; @(negedge clk); chk(!valid, "valid falls one step after re-");
    for (int i = 0; i < 4000; i++) begin
      chk(valid == (ph != 0), $sformatf("step %0d", i));
      we = 1'($urandom_range(0, 1));
      re = 1'($urandom_range(0, 1));
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
