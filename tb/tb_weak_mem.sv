// tb_weak_mem: behavioural four-port memory for testing the test automata harness.
//
// Each processor p has its own copy of the memory (its "store"). A write by p changes p's
// copy at once and reaches every other copy after an independent random delay of
// 0..MAXDELAY cycles, so with relaxed = 1 different processors can see writes in different
// orders, and even one location's writes out of order. Reads return the reader's own
// copy. With relaxed = 0 every write reaches all copies at once, which is a serial
// (sequentially consistent) memory. Each request is answered one cycle after it is seen.
`timescale 1ns/1ps
module tb_weak_mem
  import tmc_pkg::*;
#(
  parameter int MAXDELAY = 12
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     relaxed,
  input  mem_req_t req [4],
  output mem_rsp_t rsp [4]
);
  typedef struct { int dst; addr_t a; data_t d; int due; } upd_t;
  data_t store [4][NADDR];
  upd_t  pend [$];
  int    cyc = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < 4; p++) begin
        rsp[p] <= '0;
        for (int a = 0; a < NADDR; a++) store[p][a] = '0;
      end
      pend.delete();
    end else begin
      cyc++;
      // deliver due updates, in list order
      for (int k = 0; k < pend.size(); k++) begin
        if (pend[k].due <= cyc) begin
          store[pend[k].dst][pend[k].a] = pend[k].d;
          pend.delete(k);
          k--;
        end
      end
      for (int p = 0; p < 4; p++) begin
        rsp[p] <= '0;
        if (req[p].valid && !rsp[p].done) begin
          if (req[p].we) begin
            store[p][req[p].addr] = req[p].wdata;
            for (int q = 0; q < 4; q++) if (q != p) begin
              if (relaxed) pend.push_back('{q, req[p].addr, req[p].wdata, cyc + 1 + int'($urandom % MAXDELAY)});
              else store[q][req[p].addr] = req[p].wdata;
            end
            rsp[p] <= '{done: 1'b1, rdata: '0};
          end else begin
            rsp[p] <= '{done: 1'b1, rdata: store[p][req[p].addr]};
          end
        end
      end
    end
  end
endmodule
