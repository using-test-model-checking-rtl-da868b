// tb_runway_arbiter: self-checking test of the pipelined Runway arbiter.
//
// Checks: a lone request raised in cycle N is granted in cycle N+2 and only once; a
// c2cw (high priority) request wins over ordinary ones raised in the same cycle; with
// every user requesting continuously, grants rotate so that each user is served once in
// every NUSER grants; a coherent request is held while coh_allow is low and granted in
// the cycle after it rises (coh_allow is looked at in the evaluation cycle); at most one grant per cycle.
`timescale 1ns/1ps
module tb_runway_arbiter;
  localparam int NUSER = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUSER-1:0] req, hipri, coh, grant;
  logic coh_allow;
  runway_arbiter #(.NUSER(NUSER)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // users drop their request in the cycle they are granted
  always @(negedge clk) if (rst_n) begin
    check($onehot0(grant), "more than one grant");
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, served [NUSER];
    req = '0; hipri = '0; coh = '0; coh_allow = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // lone request: N -> grant at N+2
    req[2] = 1'b1;                 // cycle N
    @(negedge clk); #1 check(grant == '0, "no grant in N+1");
    @(negedge clk); #1 check(grant == 5'b00100, "grant in N+2");
    req[2] = 1'b0;
    @(negedge clk); #1 check(grant == '0, "single request granted once");
    @(negedge clk); #1 check(grant == '0, "single request granted once (2)");

    // c2cw priority
    req = 5'b10011; hipri = 5'b10000;
    @(negedge clk); @(negedge clk); #1 check(grant == 5'b10000, "c2cw requester wins first");
    req[4] = 1'b0; hipri = '0;
    while (req != '0) begin
      @(negedge clk); #1;
      req &= ~grant;
    end
    repeat (3) @(negedge clk);

    // c2cw priority against the round-robin order: serve user 0 so the pointer moves past
    // it, then user 1 (next in round-robin order) competes with a c2cw from user 0
    req = 5'b00001;
    @(negedge clk); @(negedge clk); #1 check(grant == 5'b00001, "user 0 alone granted");
    req = '0;
    repeat (3) @(negedge clk);
    req = 5'b00011; hipri = 5'b00001;
    @(negedge clk); @(negedge clk); #1 check(grant == 5'b00001, "c2cw beats round-robin order");
    req = '0; hipri = '0;
    repeat (4) @(negedge clk);

    // round robin under full load
    for (int u = 0; u < NUSER; u++) served[u] = 0;
    n0 = 0;
    req = '1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 4 * NUSER; k++) begin
      #1;
      check(grant != '0, "continuous requests keep the bus busy");
      for (int u = 0; u < NUSER; u++) if (grant[u]) served[u]++;
      req = '1;                    // re-request immediately
      @(negedge clk);
    end
    for (int u = 0; u < NUSER; u++) check(served[u] == 4, $sformatf("user %0d served %0d times", u, served[u]));
    req = '0;
    repeat (4) @(negedge clk);

    // flow control
    coh_allow = 1'b0;
    req[1] = 1'b1; coh[1] = 1'b1;
    repeat (4) begin @(negedge clk); #1 check(grant == '0, "coherent request held"); end
    coh_allow = 1'b1;              // evaluated in this cycle
    #1 check(grant == '0, "not in the evaluation cycle");
    @(negedge clk); #1 check(grant == 5'b00010, "granted the cycle after coh_allow rises");
    req = '0; coh = '0;
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
