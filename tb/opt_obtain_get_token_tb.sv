// Testbench of ObtainGetToken. Two instances, one starting without and one
// starting with the token, receive random re1/re levels for many steps; a
// reference of the four-state graph (wait re1+, wait re1-, gtok high,
// gtok still high while re is high) held as a transition table predicts
// gtok after every step. A directed sequence first checks that gtok rises
// one step after the re1 pulse ends, stays high while re is high, and falls
// one step after re falls.
module opt_obtain_get_token_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic re1 = 1'b0, re = 1'b0;
  logic gtok0, gtok1;
  int unsigned checks = 0, failures = 0;
  int unsigned ref0, ref1;  // reference state: 0..3

  always #5 clk = ~clk;

  opt_obtain_get_token #(.INIT_TOKEN(1'b0)) dut0 (.clk, .rst_n, .re1, .re, .gtok(gtok0));
  opt_obtain_get_token #(.INIT_TOKEN(1'b1)) dut1 (.clk, .rst_n, .re1, .re, .gtok(gtok1));

  // next[state][{re1,re}]
  function automatic int unsigned nxt(input int unsigned s, input logic a, input logic b);
    case (s)
      0: return a  ? 1 : 0;
      1: return !a ? 2 : 1;
      2: return b  ? 3 : 2;
      default: return !b ? 0 : 3;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    ref0 <= nxt(ref0, re1, re);
    ref1 <= nxt(ref1, re1, re);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ref0 = 0; ref1 = 2;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(!gtok0 && gtok1, "reset values");
    // Directed: pulse on re1 hands the token to dut0.
    re1 = 1'b1; @(negedge clk); chk(!gtok0, "no token during re1 high");
    re1 = 1'b0; @(negedge clk); chk(gtok0, "token one step after re1 falls");
    @(negedge clk);             chk(gtok0, "token held");
    re = 1'b1;  @(negedge clk); chk(gtok0 && gtok1, "token kept while re is high");
    @(negedge clk);             chk(gtok0 && gtok1, "token kept while re is high");
    re = 1'b0;  @(negedge clk); chk(!gtok0 && !gtok1, "token dropped one step after re falls");
    @(negedge clk);
    // Random.
    for (int i = 0; i < 4000; i++) begin
      chk(gtok0 == (ref0 >= 2), $sformatf("gtok0 step %0d", i));
      chk(gtok1 == (ref1 >= 2), $sformatf("gtok1 step %0d", i));
      re1 = 1'($urandom_range(0, 1));
      re  = 1'($urandom_range(0, 1));
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
