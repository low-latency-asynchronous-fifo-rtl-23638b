// Testbench of the cell register. Checks, for many random words: the write
// acknowledge follows the write request one step later; while wr is high the
// latch is transparent (a word written appears at q without delay when rr
// is high); after wr falls the word is held whatever d does; q is zero while
// rr is low; the read acknowledge follows rr one step later.
module cell_reg_tb;
  localparam int unsigned WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr = 1'b0, rr = 1'b0, wa, ra;
  logic [WIDTH-1:0] d = '0, q, held;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  cell_reg #(.WIDTH(WIDTH)) dut (.*);

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
    @(negedge clk);
    chk(!wa && !ra && q == '0, "idle after reset");
    for (int i = 0; i < 300; i++) begin
      held = WIDTH'($urandom);
      d  = held;
      wr = 1'b1;
      rr = 1'(i % 2);               // every other word with the read port open
      #1;
      chk(!wa, "wa not before a step");
      if (rr) chk(q == held, "transparent latch seen at q");
      else    chk(q == '0, "q zero while not read");
      @(negedge clk);
      chk(wa, "wa one step after wr");
      wr = 1'b0;
      @(negedge clk);
      chk(!wa, "wa falls one step after wr");
      d  = ~held;                   // must not reach the latch
      rr = 1'b1;
      #1;
      chk(q == held, $sformatf("held word %h read as %h", held, q));
      @(negedge clk);
      chk(ra, "ra one step after rr");
      chk(q == held, "word still on the bus");
      rr = 1'b0;
      #1;
      chk(q == '0, "bus released when rr falls");
      @(negedge clk);
      chk(!ra, "ra falls one step after rr");
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
