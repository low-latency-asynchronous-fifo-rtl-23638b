// Testbench of ObtainPutToken. Two instances, one starting without and one
// starting with the token, receive random we1/we levels for many steps; a
// reference of the four-state graph (wait we1+, wait we1-, ptok high until
// we+, wait we-) held as a transition table predicts ptok after every step.
// A directed sequence first checks that ptok rises exactly one step after
// the we1 pulse ends and falls one step after we rises.
module opt_obtain_put_token_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we1 = 1'b0, we = 1'b0;
  logic ptok0, ptok1;
  int unsigned checks = 0, failures = 0;
  int unsigned ref0, ref1;  // reference state: 0..3

  always #5 clk = ~clk;

  opt_obtain_put_token #(.INIT_TOKEN(1'b0)) dut0 (.clk, .rst_n, .we1, .we, .ptok(ptok0));
  opt_obtain_put_token #(.INIT_TOKEN(1'b1)) dut1 (.clk, .rst_n, .we1, .we, .ptok(ptok1));

  // next[state][{we1,we}]
  function automatic int unsigned nxt(input int unsigned s, input logic a, input logic b);
    case (s)
      0: return a  ? 1 : 0;
      1: return !a ? 2 : 1;
      2: return b  ? 3 : 2;
      default: return !b ? 0 : 3;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    ref0 <= nxt(ref0, we1, we);
    ref1 <= nxt(ref1, we1, we);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ref0 = 0; ref1 = 2;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(!ptok0 && ptok1, "reset values");
    // Directed: pulse on we1 hands the token to dut0.
    we1 = 1'b1; @(negedge clk); chk(!ptok0, "no token during we1 high");
    we1 = 1'b0; @(negedge clk); chk(ptok0, "token one step after we1 falls");
    @(negedge clk);             chk(ptok0, "token held");
    we = 1'b1;  @(negedge clk); chk(!ptok0 && !ptok1, "token dropped one step after we rises");
    we = 1'b0;  @(negedge clk);
    @(negedge clk);
    // Random.
    for (int i = 0; i < 4000; i++) begin
      chk(ptok0 == (ref0 == 2), $sformatf("ptok0 step %0d", i));
      chk(ptok1 == (ref1 == 2), $sformatf("ptok1 step %0d", i));
      we1 = 1'($urandom_range(0, 1));
      we  = 1'($urandom_range(0, 1));
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
