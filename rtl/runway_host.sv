// runway_host: the Runway memory controller (HOST) with main memory.
//
// HOST snoops every coherent transaction (rsp, rp) on the bus into an order queue and
// receives the cache coherency responses (ccr) of each client into that client's CCR
// queue. Because every client answers the snooped transactions in bus order, the heads of
// the order queue and of all CCR queues belong to the same transaction. Once every client
// has answered it, HOST pops them all and decides:
//   some ccr is coh_copyout -> a client will supply the data with a c2cw; HOST does nothing
//   otherwise               -> an hdr (host data return) for the requester is queued; its
//                              Client_op flag, shared, is set when any ccr is coh_shared
// Queued hdrs are driven on the bus when HOST is granted, carrying the memory contents at
// that time. Every c2cw seen on the bus also writes its data into memory, so that a line
// handed from cache to cache is up to date in memory once shared. Memory starts at 0.
//
// The CCR queues, the all-clients-answered rule, the copyout test and the Client_op
// sharing indication follow the Runway description; the order queue, the memory update
// on c2cw, reading memory when the hdr is driven and the queue depths are this design's
// choices.
module runway_host
  import tmc_pkg::*;
#(
  parameter int unsigned NCLIENT   = 4,
  parameter int unsigned CCR_DEPTH = 4,
  parameter int unsigned ORD_DEPTH = 4,
  parameter int unsigned HDR_DEPTH = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ccr_valid [NCLIENT],
  input  ccr_e    ccr       [NCLIENT],
  output logic    ccr_ready [NCLIENT],
  output logic    arb_req,
  input  logic    arb_grant,
  output rw_bus_t bus_out,
  input  rw_bus_t bus_in,
  output logic [$clog2(ORD_DEPTH+1)-1:0] ord_count,
  // observation: a transaction was resolved, with or without an hdr
  output logic    resolved,
  output logic    resolved_copyout
);
  localparam id_t HOST_ID = id_t'(NCLIENT);

  typedef struct packed { id_t dst; addr_t a; logic shared; } hdr_ent_t;

  data_t mem [NADDR];

  logic     ord_push, ord_pop, ord_empty, ord_full;
  coh_txn_t ord_din, ord_head;
  logic     hdr_push, hdr_pop, hdr_empty, hdr_full;
  hdr_ent_t hdr_din, hdr_head;
  logic [$clog2(HDR_DEPTH+1)-1:0] hdr_count;

  logic ccr_pop [NCLIENT], ccr_empty [NCLIENT], ccr_full [NCLIENT];
  ccr_e ccr_head [NCLIENT];
  logic [$clog2(CCR_DEPTH+1)-1:0] ccr_count [NCLIENT];

  sync_fifo #(.WIDTH($bits(coh_txn_t)), .DEPTH(ORD_DEPTH)) u_ord (
    .clk, .rst_n, .push(ord_push), .din(ord_din), .pop(ord_pop),
    .head(ord_head), .empty(ord_empty), .full(ord_full), .count(ord_count));
  sync_fifo #(.WIDTH($bits(hdr_ent_t)), .DEPTH(HDR_DEPTH)) u_hdr (
    .clk, .rst_n, .push(hdr_push), .din(hdr_din), .pop(hdr_pop),
    .head(hdr_head), .empty(hdr_empty), .full(hdr_full), .count(hdr_count));

  for (genvar c = 0; c < NCLIENT; c++) begin : g_ccr
    logic [1:0] raw_head;
    sync_fifo #(.WIDTH(2), .DEPTH(CCR_DEPTH)) u_ccr (
      .clk, .rst_n, .push(ccr_valid[c]), .din(2'(ccr[c])), .pop(ccr_pop[c]),
      .head(raw_head), .empty(ccr_empty[c]), .full(ccr_full[c]), .count(ccr_count[c]));
    assign ccr_head[c]  = ccr_e'(raw_head);
    assign ccr_ready[c] = !ccr_full[c];
  end

  logic all_answered, any_copyout, any_shared;
  always_comb begin
    ord_push = bus_in.valid && (bus_in.kind == TX_RSP || bus_in.kind == TX_RP);
    ord_din  = '{kind: bus_in.kind, src: bus_in.src, addr: bus_in.addr};

    all_answered = !ord_empty;
    any_copyout  = 1'b0;
    any_shared   = 1'b0;
    for (int c = 0; c < NCLIENT; c++) begin
      all_answered &= !ccr_empty[c];
      any_copyout  |= (ccr_head[c] == CCR_COPYOUT);
      any_shared   |= (ccr_head[c] == CCR_SHARED);
    end
    resolved         = all_answered && (any_copyout || !hdr_full);
    resolved_copyout = resolved && any_copyout;
    ord_pop  = resolved;
    for (int c = 0; c < NCLIENT; c++) ccr_pop[c] = resolved;
    hdr_push = resolved && !any_copyout;
    hdr_din  = '{dst: ord_head.src, a: ord_head.addr, shared: any_shared};

    arb_req = !hdr_empty && !arb_grant;   // dropped in the granted cycle
    hdr_pop = arb_grant && !hdr_empty;
    bus_out = '0;
    if (hdr_pop)
      bus_out = '{valid: 1'b1, kind: TX_HDR, src: HOST_ID, dst: hdr_head.dst,
                  addr: hdr_head.a, data: mem[hdr_head.a], shared: hdr_head.shared};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NADDR; a++) mem[a] <= '0;
    end else if (bus_in.valid && bus_in.kind == TX_C2CW) begin
      mem[bus_in.addr] <= bus_in.data;
    end
  end

  a_ccr_room: assert property (@(posedge clk) disable iff (!rst_n)
                               ccr_valid[0] |-> !ccr_full[0]);
  a_ord_room: assert property (@(posedge clk) disable iff (!rst_n) ord_push |-> !ord_full);
endmodule
