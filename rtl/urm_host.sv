// urm_host: HOST (memory controller and main memory) of the queue-abstracted bus model,
// where conflicts are resolved by counting pending c2cws.
//
// The clients answer every rsp/rp in the cycle it is on the bus (ccr[c]), so HOST
// decides at once:
//   some ccr is coh_copyout -> a client will send the data with a c2cw; the count of
//                              pending c2cws for that line (pend[a]) goes up
//   otherwise               -> an hdr for the requester is appended to the HDR queue, with
//                              the Client_op shared flag (any coh_shared) and a counter
//                              that starts at pend[a]
// A non-zero counter means the line's newest data is still in some cache on its way
// to memory. Every c2cw on the bus writes memory, decrements pend[a], and decrements
// the counter of every queued hdr for that line. The head of the HDR queue requests the
// bus only when its counter is zero. This replaces the clients' delayed coherency
// responses of the full protocol. An hdr carries the memory contents when it is driven.
//
// The HDR queue is a small shift queue (HDR_DEPTH entries) because every entry's counter
// must be decremented in place. hdr_count is brought out for bus flow control.
//
// From the queue abstraction: the per-entry counter, two bits wide by default
// (CNT_W = 2), and the rule that an hdr waits until it is zero. This design's own choices:
// pend[], and reading memory when the hdr is driven. HOST's C2CW queue of the abstract
// model is not needed here, since HOST never sends a c2cw.
module urm_host
  import tmc_pkg::*;
#(
  parameter int unsigned NCLIENT   = 4,
  parameter int unsigned HDR_DEPTH = 4,
  parameter int unsigned CNT_W     = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  ccr_e    ccr [NCLIENT],
  output logic    arb_req,
  input  logic    arb_grant,
  output rw_bus_t bus_out,
  input  rw_bus_t bus_in,
  output logic [$clog2(HDR_DEPTH+1)-1:0] hdr_count,
  // observation: the HDR head is held back by its counter; a copyout was resolved
  output logic    hdr_held,
  output logic    resolved_copyout
);
  localparam int unsigned HCW = $clog2(HDR_DEPTH + 1);
  localparam int unsigned IW  = $clog2(HDR_DEPTH);
  localparam id_t HOST_ID = id_t'(NCLIENT);

  typedef struct packed {
    id_t        dst;
    addr_t      a;
    logic       shared;
    logic [CNT_W-1:0] cnt;
  } hdr_ent_t;

  data_t            mem  [NADDR];
  logic [CNT_W-1:0] pend [NADDR];
  hdr_ent_t         q    [HDR_DEPTH];
  logic [HCW-1:0]   n;

  logic snoop, any_copy, any_shared, push, pop, c2cw_seen;
  always_comb begin
    snoop      = bus_in.valid && (bus_in.kind == TX_RSP || bus_in.kind == TX_RP);
    c2cw_seen  = bus_in.valid && (bus_in.kind == TX_C2CW);
    any_copy   = 1'b0;
    any_shared = 1'b0;
    for (int c = 0; c < NCLIENT; c++) begin
      if (ccr[c] == CCR_COPYOUT) any_copy   = 1'b1;
      if (ccr[c] == CCR_SHARED)  any_shared = 1'b1;
    end
    push     = snoop && !any_copy;
    pop      = arb_grant;
    hdr_held = (n != '0) && (q[0].cnt != '0);
    arb_req  = (n != '0) && (q[0].cnt == '0) && !arb_grant;
    bus_out  = '0;
    if (arb_grant)
      bus_out = '{valid: 1'b1, kind: TX_HDR, src: HOST_ID, dst: q[0].dst,
                  addr: q[0].a, data: mem[q[0].a], shared: q[0].shared};
    hdr_count        = n;
    resolved_copyout = snoop && any_copy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NADDR; a++) begin
        mem[a]  <= '0;
        pend[a] <= '0;
      end
      for (int k = 0; k < HDR_DEPTH; k++) q[k] <= '0;
      n <= '0;
    end else begin
      // shift out the head, decrement counters for a c2cw, append a new hdr
      for (int k = 0; k < HDR_DEPTH; k++) begin
        hdr_ent_t e;
        e = pop ? ((k + 1 < HDR_DEPTH) ? q[k + 1] : '0) : q[k];
        if (c2cw_seen && e.a == bus_in.addr && e.cnt != '0) e.cnt = e.cnt - 1'b1;
        q[k] <= e;
      end
      if (push)
        q[IW'(n - HCW'(pop))] <= '{dst: bus_in.src, a: bus_in.addr,
                                     shared: any_shared, cnt: pend[bus_in.addr]};
      n <= n + HCW'(push) - HCW'(pop);
      if (c2cw_seen) begin
        mem[bus_in.addr]  <= bus_in.data;
        pend[bus_in.addr] <= pend[bus_in.addr] - 1'b1;
      end
      if (snoop && any_copy) pend[bus_in.addr] <= pend[bus_in.addr] + 1'b1;
    end
  end

  a_room:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (n < HCW'(HDR_DEPTH)) || pop);
  a_cnt:   assert property (@(posedge clk) disable iff (!rst_n)
    snoop && any_copy |-> pend[bus_in.addr] != {CNT_W{1'b1}});
  a_pend:  assert property (@(posedge clk) disable iff (!rst_n) c2cw_seen |-> pend[bus_in.addr] != '0);
endmodule
