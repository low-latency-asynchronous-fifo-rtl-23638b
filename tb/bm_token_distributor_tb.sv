// Testbench of the base cell's Token Distributor. The testbench plays the
// four partners (right neighbour, Put and Get Controllers, Left Controller),
// each answering a request after a random number of steps, and records
// every output edge. The recorded order must repeat the Token Distributor's
// state graph: right_req-, ptok_r+, ptok_r-, pass_r+, pass_r-, right_req+,
// right_req-, gtok_r+, gtok_r-, pass_r+, pass_r-, right_req+, and each edge
// must come exactly one step after the input edge that causes it.
module bm_token_distributor_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic right_req, ptok_r, gtok_r, pass_r;
  logic right_ack = 1'b0, ptok_a = 1'b0, gtok_a = 1'b0, pass_a = 1'b0;
  int unsigned checks = 0, failures = 0;

  typedef enum int {E_RR_F, E_PR_R, E_PR_F, E_SR_R, E_SR_F, E_RR_R,
                    E_GR_R, E_GR_F} ev_t;
  localparam ev_t EXP[12] = '{E_RR_F, E_PR_R, E_PR_F, E_SR_R, E_SR_F, E_RR_R,
                              E_RR_F, E_GR_R, E_GR_F, E_SR_R, E_SR_F, E_RR_R};
  int unsigned nev = 0;
  int unsigned in_step = 0, step = 0;   // step of the last input edge

  always #5 clk = ~clk;

  bm_token_distributor dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Output edge monitor.
  logic [3:0] prev = 4'b1000;
  always @(posedge clk) if (rst_n) begin
    logic [3:0] now;
    ev_t e;
    step++;
    #1;
    now = {right_req, ptok_r, gtok_r, pass_r};
    if (now != prev) begin
      chk($countones(now ^ prev) == 1, "one output edge at a time");
      if      (prev[3] && !now[3]) e = E_RR_F;
      else if (!prev[3] && now[3]) e = E_RR_R;
      else if (!prev[2] && now[2]) e = E_PR_R;
      else if (prev[2] && !now[2]) e = E_PR_F;
      else if (!prev[1] && now[1]) e = E_GR_R;
      else if (prev[1] && !now[1]) e = E_GR_F;
      else if (!prev[0] && now[0]) e = E_SR_R;
      else                         e = E_SR_F;
      chk(e == EXP[nev % 12], $sformatf("event %0d is %s", nev, e.name()));
      chk(step == in_step + 1, $sformatf("event %0d one step after its cause", nev));
      nev++;
    end
    prev = now;
  end

  // Partners: mirror each request after a random delay of 0 to 3 extra steps.
  task automatic partner_step();
    int unsigned w;
    w = $urandom_range(0, 3);
    repeat (w) @(negedge clk);
    if (right_ack != right_req)   begin right_ack = right_req; in_step = step; end
    else if (ptok_a != ptok_r)    begin ptok_a = ptok_r;       in_step = step; end
    else if (gtok_a != gtok_r)    begin gtok_a = gtok_r;       in_step = step; end
    else if (pass_a != pass_r)    begin pass_a = pass_r;       in_step = step; end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    chk(right_req && !ptok_r && !gtok_r && !pass_r, "reset: requesting a token on the right");
    while (nev < 120) partner_step();
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
