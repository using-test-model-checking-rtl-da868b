// tb_lazy_cache_mem: self-checking test of lazy caching.
//
// A directed sequence walks through every rule: a write is buffered in Out_0 and
// completes at once; P0's read of the same location is held while Out_0 is non-empty and
// again while In_0 holds the starred update; MW_0 writes memory and queues the update
// everywhere; CU applies it, after which P0 and P1 read the new value; MR fills a cache
// from memory; CI empties a cache line so that the read waits again; an event that is not
// enabled (CU on an empty in-queue, MW on an empty out-queue) does not fire; a processor
// whose cache still holds an old value does not read it while its own newer write is a
// starred update in its in-queue.
`timescale 1ns/1ps
module tb_lazy_cache_mem;
  import tmc_pkg::*;
  localparam int NPROC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t req [NPROC];
  mem_rsp_t rsp [NPROC];
  logic ev_valid, ev_fired;
  lc_event_e ev_kind;
  logic [1:0] ev_proc;
  addr_t ev_addr;
  lazy_cache_mem #(.NPROC(NPROC), .QDEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // perform one internal event in the next cycle; return whether it fired
  task automatic event_(input lc_event_e k, input int p, input addr_t a, input bit expect_fire,
                        input string what);
    @(negedge clk);
    ev_valid = 1'b1; ev_kind = k; ev_proc = 2'(p); ev_addr = a;
    #1 check(ev_fired == expect_fire, what);
    @(negedge clk) ev_valid = 1'b0;
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPROC; p++) req[p] = '0;
    ev_valid = 1'b0; ev_kind = EV_MW; ev_proc = '0; ev_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    event_(EV_CU, 0, ADDR_A, 1'b0, "CU on empty in-queue must not fire");
    event_(EV_MW, 0, ADDR_A, 1'b0, "MW on empty out-queue must not fire");
    // P0: W(1, A) completes immediately
    @(negedge clk) req[0] = '{valid: 1'b1, we: 1'b1, addr: ADDR_A, wdata: 1'b1};
    #1 check(rsp[0].done, "write completes when buffered");
    @(negedge clk) req[0] = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: 1'b0};
    #1 check(!rsp[0].done, "read held while Out_0 non-empty");
    event_(EV_MW, 0, ADDR_A, 1'b1, "MW_0 fires");
    #1 check(dut.mem[ADDR_A] == 1'b1, "memory written by MW");
    check(!rsp[0].done, "read held while In_0 holds a starred entry");
    event_(EV_CU, 0, ADDR_A, 1'b1, "CU_0 fires");
    #1 check(rsp[0].done && rsp[0].rdata == 1'b1, "P0 reads its own write");
    @(negedge clk) req[0] = '0;
    // P1: read A, cache update pending in In_1
    req[1] = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: 1'b0};
    #1 check(!rsp[1].done, "P1 read waits for a cached copy");
    event_(EV_CU, 1, ADDR_A, 1'b1, "CU_1 fires");
    #1 check(rsp[1].done && rsp[1].rdata == 1'b1, "P1 reads the propagated write");
    @(negedge clk) req[1] = '0;
    // P2: MR fill of B
    req[2] = '{valid: 1'b1, we: 1'b0, addr: ADDR_B, wdata: 1'b0};
    event_(EV_CU, 2, ADDR_A, 1'b1, "CU_2 (update of A) fires");
    #1 check(!rsp[2].done, "P2 read of B still misses");
    event_(EV_MR, 2, ADDR_B, 1'b1, "MR_2(B) fires");
    #1 check(!rsp[2].done, "P2 read waits for the fill to be applied");
    event_(EV_CU, 2, ADDR_B, 1'b1, "CU_2 (fill of B) fires");
    #1 check(rsp[2].done && rsp[2].rdata == 1'b0, "P2 reads B = 0 from memory");
    @(negedge clk) req[2] = '0;
    // CI: drop B from P2's cache
    event_(EV_CI, 2, ADDR_B, 1'b1, "CI_2(B) fires");
    @(negedge clk) req[2] = '{valid: 1'b1, we: 1'b0, addr: ADDR_B, wdata: 1'b0};
    #1 check(!rsp[2].done, "P2 read of invalidated B waits");
    @(negedge clk) req[2] = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: 1'b0};
    #1 check(rsp[2].done && rsp[2].rdata == 1'b1, "P2 still holds A");
    @(negedge clk) req[2] = '0;
    // P3 still has its non-starred update of A pending; its read of A misses until CU
    req[3] = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: 1'b0};
    #1 check(!rsp[3].done, "P3 read waits");
    event_(EV_CU, 3, ADDR_A, 1'b1, "CU_3 fires");
    #1 check(rsp[3].done && rsp[3].rdata == 1'b1, "P3 reads A = 1");
    @(negedge clk) req[3] = '0;
    // P1 holds A = 1 in its cache and writes A = 0: after MW_1 its own (starred) update
    // is still in In_1, so a read of A must wait for it rather than return the stale 1
    @(negedge clk) req[1] = '{valid: 1'b1, we: 1'b1, addr: ADDR_A, wdata: 1'b0};
    #1 check(rsp[1].done, "P1 write of A = 0 buffered");
    @(negedge clk) req[1] = '0;
    event_(EV_MW, 1, ADDR_A, 1'b1, "MW_1 fires");
    @(negedge clk) req[1] = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: 1'b0};
    #1 check(!rsp[1].done, "P1 read waits for its own starred update (no stale hit)");
    event_(EV_CU, 1, ADDR_A, 1'b1, "CU_1 applies the starred update");
    #1 check(rsp[1].done && rsp[1].rdata == 1'b0, "P1 reads its own write A = 0");
    @(negedge clk) req[1] = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
