// Testbench of the transferer handshake component. The testbench activates
// it on a, serves its pull on i with random data, and acknowledges its push
// on o, all after random delays. Each cycle checks the order
//   a_r+ i_r+ i_a+ o_r+ o_a+ a_a+ a_r- (i_r-, o_r-) i_a- o_a- a_a-
// with each output edge one step after its cause, that o_d carries the
// pulled word while o_r is high, and that a_a stays high until both passive
// sides have returned to zero (taken in random order).
module hs_transferer_tb;
  localparam int unsigned WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_r = 1'b0, i_a = 1'b0, o_a = 1'b0;
  logic [WIDTH-1:0] i_d = '0, o_d;
  logic a_a, i_r, o_r;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  hs_transferer #(.WIDTH(WIDTH)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic hold(input logic [2:0] exp, input string what);
    int unsigned n;
    n = $urandom_range(0, 3);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      chk({a_a, i_r, o_r} == exp, $sformatf("outputs hold %s", what));
    end
  endtask

  task automatic expect_next(input logic [2:0] exp, input string what);
    @(negedge clk);
    chk({a_a, i_r, o_r} == exp, $sformatf("%s: got %b expected %b", what, {a_a, i_r, o_r}, exp));
  endtask

  initial begin
    logic [WIDTH-1:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hold(3'b000, "idle");
    for (int c = 0; c < 300; c++) begin
      d = WIDTH'($urandom);
      a_r = 1'b1; expect_next(3'b010, "i_r+"); hold(3'b010, "pulling");
      i_d = d; i_a = 1'b1; expect_next(3'b011, "o_r+");
      chk(o_d == d, "pushed word is the pulled word");
      hold(3'b011, "pushing");
      o_a = 1'b1; expect_next(3'b111, "a_a+"); hold(3'b111, "done");
      a_r = 1'b0; expect_next(3'b100, "i_r- and o_r-"); hold(3'b100, "returning");
      if ($urandom_range(0, 1) == 1) begin
        i_a = 1'b0; hold(3'b100, "o side still high"); @(negedge clk); chk(a_a, "a_a waits for o_a-");
        o_a = 1'b0;
      end else begin
        o_a = 1'b0; hold(3'b100, "i side still high"); @(negedge clk); chk(a_a, "a_a waits for i_a-");
        i_a = 1'b0;
      end
      expect_next(3'b000, "a_a-");
      hold(3'b000, "idle");
    end
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
