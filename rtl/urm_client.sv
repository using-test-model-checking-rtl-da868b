// urm_client: a Runway client of the queue-abstracted bus model, with a
// cache and a c2cw queue but no snoop (CCC) or data return (DR) queue.
//
// The cache holds one line per location in one of four states (invalid, shared,
// private-clean, dirty). Hits and misses are as in runway_client. A read miss issues rsp
// and a write miss issues rp, a write to a shared line included.
//
// Immediate coherency response. With no CCC queue, the client answers every rsp/rp on
// the bus in the same cycle, on ccr. It answers from the line state, as in runway_client:
// other's rsp on shared/private-clean gives coh_shared, other's rp on them gives coh_ok and
// invalidates, a dirty line gives coh_copyout, invalidates and queues a c2cw. Ownership of
// a miss is taken when the client's own transaction is on the bus, so a later request for
// the same line can arrive before the data. The client then answers for the state the line
// is about to reach:
//   pending write (rp)  -> coh_copyout; a c2cw is queued that waits until the write is done
//   pending read (rsp)  -> coh_shared for rsp (the line will be installed shared),
//                          coh_ok for rp (the line will be dropped after the read)
// These "after completion" changes are kept in post_shared and post_inval.
//
// Data return bit. A data return (hdr or c2cw) addressed to this client sets the line's
// data-returned bit and holds the data. The waiting access completes from it in the next
// cycle, and that clears the bit. With one outstanding access per processor, no earlier
// access can still be open, so the bit is set for one cycle.
//
// The c2cw queue head requests the bus with high priority once it is not waiting for the
// client's own write. It carries the line's data at the time it is driven.
//
// Interface: blocking processor port; arbitration request (arb_req, arb_hipri for a c2cw,
// arb_coh for rsp/rp), held until arb_grant; bus_out driven only when granted; bus_in is
// the snooped bus. Timing as runway_client: a lone miss is on the bus 3 cycles after the
// request.
//
// Taken from the queue abstraction: no CCC, CCR or DR queue; immediate ccr; one bit per
// line for data returned before it can be used; c2cw queue kept. This design's own
// choices: the answers for a line whose miss is owned but not yet complete, the
// post-completion flags, and stalling a hit or a completion for a cycle when another
// client's transaction on the same line is on the bus.
module urm_client
  import tmc_pkg::*;
#(
  parameter int unsigned ID         = 0,
  parameter int unsigned C2CW_DEPTH = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output mem_rsp_t rsp,
  output logic     arb_req,
  output logic     arb_hipri,
  output logic     arb_coh,
  input  logic     arb_grant,
  output rw_bus_t  bus_out,
  input  rw_bus_t  bus_in,
  // immediate cache coherency response to the rsp/rp on bus_in
  output ccr_e     ccr,
  // observation: data returned and held for one cycle; copyout of a line still pending
  output logic     dr_bit_set,
  output logic     copyout_pending
);
  localparam id_t MY_ID = id_t'(ID);

  typedef struct packed { id_t dst; addr_t a; logic wait_own; } c2cw_ent_t;

  line_state_e line_st [NADDR];
  data_t       line_d  [NADDR];

  logic    miss_active, miss_issued, miss_owned;
  logic    post_shared, post_inval;
  rw_txn_e miss_kind;
  addr_t   miss_addr;

  logic    dr_bit;
  data_t   dr_d;
  logic    dr_shared;

  logic      cw_push, cw_pop, cw_empty, cw_full;
  c2cw_ent_t cw_din, cw_head;
  logic [$clog2(C2CW_DEPTH+1)-1:0] cw_count;
  logic      cw_wait;     // a queued c2cw waits for this client's own write

  sync_fifo #(.WIDTH($bits(c2cw_ent_t)), .DEPTH(C2CW_DEPTH)) u_c2cw (
    .clk, .rst_n, .push(cw_push), .din(cw_din), .pop(cw_pop),
    .head(cw_head), .empty(cw_empty), .full(cw_full), .count(cw_count));

  // ---------------------------------------------------------------- snoop and answer
  logic snoop, snoop_own, snoop_other, snoop_pend;
  logic [1:0] snoop_next;      // 0 keep, 1 shared, 2 invalid
  always_comb begin
    snoop       = bus_in.valid && (bus_in.kind == TX_RSP || bus_in.kind == TX_RP);
    snoop_own   = snoop && (bus_in.src == MY_ID);
    snoop_other = snoop && (bus_in.src != MY_ID);
    snoop_pend  = snoop_other && miss_active && miss_owned && (miss_addr == bus_in.addr);
    ccr         = CCR_OK;
    snoop_next  = 2'd0;
    cw_push     = 1'b0;
    cw_din      = '{dst: bus_in.src, a: bus_in.addr, wait_own: snoop_pend};
    if (snoop_pend) begin
      if (post_inval) begin
        ccr = CCR_OK;
      end else if (miss_kind == TX_RP) begin
        ccr     = CCR_COPYOUT;
        cw_push = 1'b1;
      end else if (bus_in.kind == TX_RSP) begin
        ccr = CCR_SHARED;
      end else begin
        ccr = CCR_OK;
      end
    end else if (snoop_other) begin
      unique case (line_st[bus_in.addr])
        LS_INVALID: ccr = CCR_OK;
        LS_SHARED, LS_PRIV_CLEAN: begin
          ccr        = (bus_in.kind == TX_RSP) ? CCR_SHARED : CCR_OK;
          snoop_next = (bus_in.kind == TX_RSP) ? 2'd1 : 2'd2;
        end
        LS_DIRTY: begin
          ccr        = CCR_COPYOUT;
          snoop_next = 2'd2;
          cw_push    = 1'b1;
        end
      endcase
    end
  end

  // ---------------------------------------------------------------- processor side
  logic hit, complete, same_line_snoop;
  always_comb begin
    same_line_snoop = snoop_other && (bus_in.addr == req.addr);
    hit = 1'b0;
    if (req.valid && !miss_active && !same_line_snoop) begin
      if (req.we) hit = (line_st[req.addr] == LS_PRIV_CLEAN) || (line_st[req.addr] == LS_DIRTY);
      else        hit = (line_st[req.addr] != LS_INVALID);
    end
    complete = miss_active && dr_bit && !(snoop_other && bus_in.addr == miss_addr);
    rsp.done  = hit || complete;
    rsp.rdata = complete ? dr_d : line_d[req.addr];
  end

  // ---------------------------------------------------------------- bus side
  logic cw_ready, miss_want, drive_cw;
  always_comb begin
    cw_ready  = !cw_empty && !(cw_head.wait_own && cw_wait);
    miss_want = miss_active && !miss_issued;
    drive_cw  = arb_grant && cw_ready;
    arb_hipri = cw_ready;
    arb_coh   = !cw_ready && miss_want;
    arb_req   = (cw_ready || miss_want) && !arb_grant;
    cw_pop    = drive_cw;
    bus_out   = '0;
    if (drive_cw)
      bus_out = '{valid: 1'b1, kind: TX_C2CW, src: MY_ID, dst: cw_head.dst,
                  addr: cw_head.a, data: line_d[cw_head.a], shared: 1'b0};
    else if (arb_grant && miss_want)
      bus_out = '{valid: 1'b1, kind: miss_kind, src: MY_ID, dst: '0,
                  addr: miss_addr, data: '0, shared: 1'b0};
    dr_bit_set      = dr_bit;
    copyout_pending = cw_wait;
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NADDR; a++) begin
        line_st[a] <= LS_INVALID;
        line_d[a]  <= '0;
      end
      miss_active <= 1'b0;
      miss_issued <= 1'b0;
      miss_owned  <= 1'b0;
      miss_kind   <= TX_RSP;
      miss_addr   <= '0;
      post_shared <= 1'b0;
      post_inval  <= 1'b0;
      dr_bit      <= 1'b0;
      dr_d        <= '0;
      dr_shared   <= 1'b0;
      cw_wait     <= 1'b0;
    end else begin
      // snoop of another client's transaction on a line not owned by a pending miss
      if (snoop_other && !snoop_pend) begin
        if (snoop_next == 2'd1) line_st[bus_in.addr] <= LS_SHARED;
        if (snoop_next == 2'd2) line_st[bus_in.addr] <= LS_INVALID;
      end
      if (snoop_pend) begin
        if (bus_in.kind == TX_RSP) post_shared <= 1'b1;
        if (bus_in.kind == TX_RP || miss_kind == TX_RP) post_inval <= 1'b1;
        if (cw_push) cw_wait <= 1'b1;
      end
      // hit
      if (hit && req.we) begin
        line_d[req.addr]  <= req.wdata;
        line_st[req.addr] <= LS_DIRTY;
      end
      // start a miss
      if (req.valid && !miss_active && !hit && !same_line_snoop) begin
        miss_active <= 1'b1;
        miss_issued <= 1'b0;
        miss_owned  <= 1'b0;
        miss_kind   <= req.we ? TX_RP : TX_RSP;
        miss_addr   <= req.addr;
        post_shared <= 1'b0;
        post_inval  <= 1'b0;
      end
      if (bus_out.valid && bus_out.kind != TX_C2CW) miss_issued <= 1'b1;
      // own transaction on the bus: ownership taken, line leaves its old state
      if (snoop_own) begin
        miss_owned          <= 1'b1;
        line_st[bus_in.addr] <= LS_INVALID;
      end
      // data return for this client
      if (bus_in.valid && (bus_in.kind == TX_HDR || bus_in.kind == TX_C2CW) && bus_in.dst == MY_ID) begin
        dr_bit    <= 1'b1;
        dr_d      <= bus_in.data;
        dr_shared <= (bus_in.kind == TX_HDR) && bus_in.shared;
      end
      // completion of the waiting access
      if (complete) begin
        miss_active <= 1'b0;
        miss_owned  <= 1'b0;
        dr_bit      <= 1'b0;
        cw_wait     <= 1'b0;
        if (req.we) begin
          line_d[miss_addr]  <= req.wdata;
          line_st[miss_addr] <= post_inval ? LS_INVALID : LS_DIRTY;
        end else begin
          line_d[miss_addr]  <= dr_d;
          line_st[miss_addr] <= post_inval ? LS_INVALID :
                                (post_shared || dr_shared) ? LS_SHARED : LS_PRIV_CLEAN;
        end
      end
    end
  end

  a_cw_room: assert property (@(posedge clk) disable iff (!rst_n) cw_push |-> !cw_full);
  a_dr_owned: assert property (@(posedge clk) disable iff (!rst_n)
    (bus_in.valid && (bus_in.kind == TX_HDR || bus_in.kind == TX_C2CW) && bus_in.dst == MY_ID)
      |-> (miss_active && miss_owned && !dr_bit && bus_in.addr == miss_addr));
  a_hold_req: assert property (@(posedge clk) disable iff (!rst_n)
    req.valid && !rsp.done |=> req.valid);
  a_grant_used: assert property (@(posedge clk) disable iff (!rst_n) arb_grant |-> bus_out.valid);
endmodule
