// Testbench of the handshake-circuit Starter. The testbench plays cell 0 on
// the Starter's left channel (it keeps asking for tokens, with random pauses)
// and cell N-1 on its right channel (it answers each request after a random
// delay), and records every output edge. The first two left handshakes must
// complete without any right request (the two tokens put into circulation);
// after that each token must be fetched on the right before it is handed out
// on the left: right_req+, right_req-, left_ack+, left_ack-. left_ack may
// only rise while left_req is high and fall while it is low.
module hs_starter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic left_req = 1'b0, right_ack = 1'b0;
  logic left_ack, right_req;
  int unsigned checks = 0, failures = 0;

  typedef enum int {E_LA_R, E_LA_F, E_RR_R, E_RR_F} ev_t;
  localparam ev_t EXP[4] = '{E_RR_R, E_RR_F, E_LA_R, E_LA_F};
  int unsigned nev = 0, relays = 0;

  always #5 clk = ~clk;

  hs_starter dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [1:0] prev = 2'b00;
  always @(posedge clk) if (rst_n) begin
    logic [1:0] now;
    ev_t e;
    #1;
    now = {left_ack, right_req};
    if (now != prev) begin
      chk($countones(now ^ prev) == 1, "one output edge at a time");
      if      (!prev[1] && now[1]) e = E_LA_R;
      else if (prev[1] && !now[1]) e = E_LA_F;
      else if (!prev[0] && now[0]) e = E_RR_R;
      else                         e = E_RR_F;
      if (nev < 4) chk(e == ((nev % 2 == 0) ? E_LA_R : E_LA_F), $sformatf("grant event %0d is %s", nev, e.name()));
      else         chk(e == EXP[(nev - 4) % 4], $sformatf("relay event %0d is %s", nev, e.name()));
      if (e == E_LA_R) chk(left_req, "left_ack rises only on a request");
      if (e == E_LA_F) chk(!left_req, "left_ack falls only after the request");
      if (e == E_LA_R && nev >= 4) relays++;
      nev++;
    end
    prev = now;
  end

  // Right partner: mirrors right_req after 0 to 3 steps.
  initial forever begin
    @(negedge clk);
    if (right_ack != right_req) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      right_ack = right_req;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      left_req = 1'b1;
      do @(negedge clk); while (!left_ack);
      left_req = 1'b0;
      do @(negedge clk); while (left_ack);
    end
    chk(relays == 38, $sformatf("%0d relays for 40 left handshakes", relays));
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
