// tb_serial_mem: self-checking test of the serial memory.
//
// Four processor ports issue random reads and writes to the two locations, each holding
// its request until done. The testbench keeps its own copy of the memory and checks that
// at most one request is answered per cycle, that a read returns the current contents,
// that a write is visible to the next access, and that no waiting processor waits more
// than NPROC cycles (round robin). A directed write/read pair opens the test.
`timescale 1ns/1ps
module tb_serial_mem;
  import tmc_pkg::*;
  localparam int NPROC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t req [NPROC];
  mem_rsp_t rsp [NPROC];
  serial_mem #(.NPROC(NPROC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  data_t model [NADDR];
  int wait_cnt [NPROC];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPROC; p++) begin req[p] = '0; wait_cnt[p] = 0; end
    for (int a = 0; a < NADDR; a++) model[a] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // directed: P2 writes B := 1, then P1 reads B
    req[2] = '{valid: 1'b1, we: 1'b1, addr: ADDR_B, wdata: 1'b1};
    #1 check(rsp[2].done, "lone write not answered in its cycle");
    @(negedge clk) req[2] = '0;
    req[1] = '{valid: 1'b1, we: 1'b0, addr: ADDR_B, wdata: 1'b0};
    #1 check(rsp[1].done && rsp[1].rdata == 1'b1, "read after write");
    @(negedge clk) req[1] = '0;
    model[ADDR_B] = 1'b1;
    // random traffic
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int ndone;
      logic [NPROC-1:0] got;
      for (int p = 0; p < NPROC; p++)
        if (!req[p].valid && ($urandom % 2))
          req[p] = '{valid: 1'b1, we: 1'($urandom), addr: addr_t'($urandom), wdata: data_t'($urandom)};
      #1;
      ndone = 0;
      for (int p = 0; p < NPROC; p++) begin
        got[p] = rsp[p].done;
        if (rsp[p].done) begin
          ndone++;
          check(req[p].valid, "done without request");
          if (!req[p].we) check(rsp[p].rdata == model[req[p].addr], "read data");
        end
      end
      check(ndone == 1 || (ndone == 0 && !(req[0].valid || req[1].valid || req[2].valid || req[3].valid)),
            "exactly one request answered when any waits");
      @(negedge clk);
      for (int p = 0; p < NPROC; p++) begin
        if (got[p]) begin
          if (req[p].we) model[req[p].addr] = req[p].wdata;
          req[p] = '0;
          wait_cnt[p] = 0;
        end else if (req[p].valid) begin
          wait_cnt[p]++;
          check(wait_cnt[p] < NPROC, "request waited NPROC cycles or more");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
