// serial_mem: the serial memory, the operational definition of sequential consistency.
//
// One shared array Mem holds every location. Each processor port carries a blocking
// request; a read R_i(d, a) returns Mem[a] and a write W_i(d, a) sets Mem[a] := d. At most
// one request is performed per cycle, so all accesses form one total order that respects
// each processor's program order. Which waiting processor goes next is a free choice in
// the original definition; here a round-robin pointer makes it, which is this design's
// choice. The memory starts with every location 0.
//
// Timing: a request present in cycle N that wins the round robin is answered in the same
// cycle by rsp.done (read data valid with it); the write takes effect at the end of that
// cycle. With k requesters waiting, each is served within k cycles.
module serial_mem
  import tmc_pkg::*;
#(
  parameter int unsigned NPROC = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req [NPROC],
  output mem_rsp_t rsp [NPROC]
);
  localparam int unsigned PW = (NPROC > 1) ? $clog2(NPROC) : 1;

  data_t         mem [NADDR];
  logic [PW-1:0] rr_ptr;
  logic          sel_valid;
  logic [PW-1:0] sel;

  // Round robin: first requester at or after rr_ptr.
  always_comb begin
    sel_valid = 1'b0;
    sel       = '0;
    for (int unsigned k = 0; k < NPROC; k++) begin
      automatic int unsigned p = (int'(rr_ptr) + k) % NPROC;
      if (!sel_valid && req[p].valid) begin
        sel_valid = 1'b1;
        sel       = PW'(p);
      end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < NPROC; p++) begin
      rsp[p].done  = sel_valid && (sel == PW'(p));
      rsp[p].rdata = mem[req[p].addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr <= '0;
      for (int unsigned a = 0; a < NADDR; a++) mem[a] <= '0;
    end else if (sel_valid) begin
      rr_ptr <= (sel == PW'(NPROC - 1)) ? '0 : sel + 1'b1;
      if (req[sel].we) mem[req[sel].addr] <= req[sel].wdata;
    end
  end
endmodule
