// tb_runway_system: self-checking test of the Runway-PA8000 memory system, four clients.
//
// Directed part: a lone read miss reaches the bus three cycles after the access is
// presented (one cycle to register the miss, then request in cycle N and mastership in
// N+2) and returns memory's 0; a write hit on the private-clean line; a read by another
// client obtains the dirty data by copyout and c2cw; a third client then gets it from
// memory with the shared indication; a write miss invalidates every copy; a further read
// sees the newest value. Random part: all four processors issue random accesses with
// random snoop-processing pauses; every access must complete within a bound, and after
// each burst every processor must read the same value at each location, equal to the
// last value written (the testbench tracks the write order from the done pulses).
`timescale 1ns/1ps
module tb_runway_system;
  import tmc_pkg::*;
  localparam int NC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t req [NC];
  mem_rsp_t rsp [NC];
  logic [NC-1:0] ccc_hold;
  rw_bus_t bus;
  logic [NC-1:0] ccr_delay_c2cw, ccr_delay_own;
  logic copyout, coh_blocked;

  runway_system #(.NCLIENT(NC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  int n_c2cw = 0, n_hdr_sh = 0;
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
    ccc_hold = '0;
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

    // random bursts
    last[ADDR_A] = 1'b0; last[ADDR_B] = 1'b0;
    for (int burst = 0; burst < 20; burst++) begin
      for (int p = 0; p < NC; p++) busy_for[p] = 0;
      for (int k = 0; k < 300; k++) begin
        @(negedge clk);
        ccc_hold = NC'($urandom) & NC'($urandom);
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
        @(negedge clk); ccc_hold = '0; #1;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
