// tb_urm_system: self-checking test of the queue-abstracted Runway model, four clients.
//
// Directed part: a lone read miss reaches the bus three cycles after the access is
// presented; a write hit on the private-clean line; a read by another client obtains the
// dirty data by copyout and c2cw; a third client then gets it from memory with the shared
// indication; a write miss invalidates every copy; a further read sees the newest value;
// a write miss on B with two reads right behind it leaves every copy of B at the new value.
// Random part: all four processors issue random accesses; every access must complete
// within a bound, and after each burst every processor must read the same value at each
// location, equal to the last value written (tracked from the done pulses). Also counted,
// and required to happen: an hdr held back by its c2cw counter, a c2cw waiting for its
// sender's own write, and the data-returned bit.
`timescale 1ns/1ps
module tb_urm_system;
  import tmc_pkg::*;
  localparam int NC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t req [NC];
  mem_rsp_t rsp [NC];
  rw_bus_t bus;
  logic hdr_held, copyout, coh_blocked;
  logic [NC-1:0] dr_bit, copyout_wait;

  urm_system #(.NCLIENT(NC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  int n_c2cw = 0, n_hdr_sh = 0, n_held = 0, n_wait = 0, n_dr = 0;
  always @(posedge clk) if (rst_n) begin
    n_held += int'(hdr_held);
    n_wait += $countones(copyout_wait);
    n_dr   += $countones(dr_bit);
  end
  always @(posedge clk) if (rst_n && bus.valid) begin
    if (bus.kind == TX_C2CW) n_c2cw++;
    if (bus.kind == TX_HDR && bus.shared) n_hdr_sh++;
  end

  // one blocking access; returns read data
  task automatic access(input int p, input logic we, input addr_t a, input data_t d,
                        output data_t q);
    int t = 0;
    @(negedge clk);
    req[p] = '{valid: 1'b1, we: we, addr: a, wdata: d};
    #1;
    while (!rsp[p].done && t < 200) begin @(negedge clk); #1; t++; end
    check(rsp[p].done, $sformatf("access by P%0d completes", p));
    q = rsp[p].rdata;
    @(negedge clk);
    req[p] = '0;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  data_t q;
  data_t last [NADDR];
  int busy_for [NC];

  initial begin
    int c0;
    for (int p = 0; p < NC; p++) req[p] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // latency of a lone miss to the bus
    req[0] = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: '0};
    c0 = cyc;
    @(posedge clk);
    while (!(bus.valid && bus.kind == TX_RSP)) @(posedge clk);
    check(cyc - c0 == 3, $sformatf("rsp on bus %0d cycles after the access (3 expected)", cyc - c0));
    while (!rsp[0].done) @(negedge clk);
    check(rsp[0].rdata == 1'b0, "memory starts at 0");
    @(negedge clk) req[0] = '0;

    access(0, 1'b1, ADDR_A, 1'b1, q);
    check(dut.g_client[0].u_client.line_st[ADDR_A] == LS_DIRTY, "write hit makes the line dirty");
    access(1, 1'b0, ADDR_A, '0, q);
    check(q == 1'b1, "P1 reads dirty data via c2cw");
    check(n_c2cw == 1, $sformatf("one c2cw (%0d)", n_c2cw));
    access(2, 1'b0, ADDR_A, '0, q);
    check(q == 1'b1, "P2 reads c2cw-updated memory");
    check(n_hdr_sh == 1, "hdr with shared indication");
    access(3, 1'b1, ADDR_A, 1'b0, q);
    check(dut.g_client[0].u_client.line_st[ADDR_A] == LS_INVALID, "write miss invalidates P0");
    check(dut.g_client[1].u_client.line_st[ADDR_A] == LS_INVALID, "write miss invalidates P1");
    check(dut.g_client[2].u_client.line_st[ADDR_A] == LS_INVALID, "write miss invalidates P2");
    access(0, 1'b0, ADDR_A, '0, q);
    check(q == 1'b0, "P0 reads the newest value");

    // counter race on untouched B: P0's write miss, then reads by P1 and P2 on the bus
    // right behind it. P1 is served by P0's copyout; P2's hdr must wait for that c2cw,
    // or P2 keeps a stale shared copy.
    begin
      data_t q1, q2, q3;
      fork
        access(0, 1'b1, ADDR_B, 1'b1, q1);
        access(1, 1'b0, ADDR_B, '0, q2);
        access(2, 1'b0, ADDR_B, '0, q3);
      join
      check(q2 == 1'b1, "P1 reads B written by P0 (copyout)");
      for (int p = 0; p < 3; p++) begin
        access(p, 1'b0, ADDR_B, '0, q);
        check(q == 1'b1, $sformatf("P%0d reads B = 1 after the race", p));
      end
    end

    // random bursts
    last[ADDR_A] = 1'b0; last[ADDR_B] = 1'b0;
    for (int burst = 0; burst < 20; burst++) begin
      for (int p = 0; p < NC; p++) busy_for[p] = 0;
      for (int k = 0; k < 300; k++) begin
        @(negedge clk);
        for (int p = 0; p < NC; p++)
          if (!req[p].valid && k < 250 && ($urandom % 3) == 0)
            req[p] = '{valid: 1'b1, we: 1'($urandom), addr: addr_t'($urandom), wdata: data_t'($urandom)};
        #1;
        for (int p = 0; p < NC; p++) begin
          if (rsp[p].done) begin
            if (req[p].we) last[req[p].addr] = req[p].wdata;
            busy_for[p] = 0;
          end else if (req[p].valid) begin
            busy_for[p]++;
            if (busy_for[p] == 150) check(1'b0, $sformatf("P%0d access stuck", p));
          end
        end
        @(posedge clk); #1;
        for (int p = 0; p < NC; p++) if (busy_for[p] == 0 && req[p].valid) req[p] = '0;
      end
      // wait for outstanding accesses, then everyone must agree
      for (int t = 0; t < 200; t++) begin
        @(negedge clk); #1;
        for (int p = 0; p < NC; p++) if (rsp[p].done) begin
          if (req[p].we) last[req[p].addr] = req[p].wdata;
        end
        @(posedge clk); #1;
      end
      for (int p = 0; p < NC; p++) req[p] = '0;
      for (int a = 0; a < NADDR; a++)
        for (int p = 0; p < NC; p++) begin
          access(p, 1'b0, addr_t'(a), '0, q);
          check(q == last[a], $sformatf("P%0d reads last value of location %0d", p, a));
        end
    end
    $display("hdr held=%0d c2cw waiting=%0d data-returned bit=%0d", n_held, n_wait, n_dr);
    check(n_held > 0, "an hdr was held back by its c2cw counter");
    check(n_wait > 0, "a c2cw waited for its sender's own write");
    check(n_dr > 0,   "data-returned bit used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
