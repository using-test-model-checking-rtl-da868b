// runway_client: a PA8000 processor's Runway interface and cache, as one bus client.
//
// The cache holds one line per location in one of four states (invalid, shared,
// private-clean, dirty). A read hits in any valid state, a write in private-clean or
// dirty (the line becomes dirty). A read miss issues an rsp (read shared or private)
// transaction, a write miss an rp (read private); a write to a shared line is a write
// miss. The processor port is blocking: one access, hence at most one miss, at a time.
//
// Snooping. Every rsp/rp on the bus, this client's own included, is pushed into the CCC
// (cache coherency check) queue. The head of the CCC queue is processed at the client's
// own pace: it sends a ccr (cache coherency response) to HOST and updates the line:
//   own transaction                 -> coh_ok; the line enters the transient state
//                                      (ownership taken, data still awaited)
//   other's, line invalid           -> coh_ok
//   other's rsp, private-clean/shared -> coh_shared, line shared
//   other's rp,  private-clean/shared -> coh_ok, line invalid
//   other's, line dirty             -> coh_copyout, line invalid, and a c2cw (cache to
//                                      cache write) carrying the line is queued for the
//                                      requester
// The head is held back (the ccr is delayed) while a c2cw for the same line is still
// queued, and while this client owns an outstanding miss on that line whose data has not
// yet arrived and been used by the waiting access.
//
// How fast the CCC queue is worked off is left open; ccc_hold pauses it for a cycle.
//
// Data returns (hdr from HOST, c2cw from another client) addressed to this client go into
// the DR (data return) queue. Data is used only once the client's own transaction has been
// processed at the head of its CCC queue; then the access completes: a read returns the
// data and the line becomes shared or private-clean (as HOST's Client_op shared flag
// says), a write stores its data and the line becomes dirty.
//
// Bus side: the client raises arb_req while it has a c2cw queued (arb_hipri, highest
// priority) or a miss to issue (arb_coh, a coherent transaction). In a granted cycle it
// drives bus_out, a queued c2cw first. The line states, the ccr table, the ccr delays and
// the DR rule follow the Runway/PA8000 description; the one-line-per-location cache, the
// blocking port, write-to-shared as rp, the states after a data return and the queue
// depths are this design's choices.
module runway_client
  import tmc_pkg::*;
#(
  parameter int unsigned ID         = 0,
  parameter int unsigned CCC_DEPTH  = 4,
  parameter int unsigned DR_DEPTH   = 2,
  parameter int unsigned C2CW_DEPTH = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  // processor port
  input  mem_req_t req,
  output mem_rsp_t rsp,
  // arbitration
  output logic     arb_req,
  output logic     arb_hipri,
  output logic     arb_coh,
  input  logic     arb_grant,
  // bus
  output rw_bus_t  bus_out,
  input  rw_bus_t  bus_in,
  // cache coherency response to HOST
  output logic     ccr_valid,
  output ccr_e     ccr,
  input  logic     ccr_ready,
  // hold off CCC processing this cycle (the client works at its own pace)
  input  logic     ccc_hold,
  // CCC queue occupancy, for bus flow control
  output logic [$clog2(CCC_DEPTH+1)-1:0] ccc_count,
  // observation: a ccr was held back this cycle (c2cw pending / data awaited)
  output logic     ccr_delay_c2cw,
  output logic     ccr_delay_own
);
  localparam id_t MY_ID = id_t'(ID);

  typedef struct packed { addr_t a; data_t d; logic shared; } dr_ent_t;
  typedef struct packed { id_t dst; addr_t a; data_t d; } c2cw_ent_t;
  localparam int unsigned C2W = $clog2(C2CW_DEPTH + 1);

  line_state_e line_st [NADDR];
  data_t       line_d  [NADDR];

  // outstanding miss
  logic    miss_active, miss_issued, miss_owned;
  rw_txn_e miss_kind;
  addr_t   miss_addr;

  // queues
  logic      ccc_push, ccc_pop, ccc_empty, ccc_full;
  coh_txn_t  ccc_din, ccc_head;
  logic      dr_push, dr_pop, dr_empty, dr_full;
  dr_ent_t   dr_din, dr_head;
  logic      cw_push, cw_pop, cw_empty, cw_full;
  c2cw_ent_t cw_din, cw_head;
  logic [$clog2(DR_DEPTH+1)-1:0]   dr_count;
  logic [C2W-1:0]                  cw_count;
  logic [C2W-1:0]                  cw_pend [NADDR];   // queued c2cw per line

  sync_fifo #(.WIDTH($bits(coh_txn_t)), .DEPTH(CCC_DEPTH)) u_ccc (
    .clk, .rst_n, .push(ccc_push), .din(ccc_din), .pop(ccc_pop),
    .head(ccc_head), .empty(ccc_empty), .full(ccc_full), .count(ccc_count));
  sync_fifo #(.WIDTH($bits(dr_ent_t)), .DEPTH(DR_DEPTH)) u_dr (
    .clk, .rst_n, .push(dr_push), .din(dr_din), .pop(dr_pop),
    .head(dr_head), .empty(dr_empty), .full(dr_full), .count(dr_count));
  sync_fifo #(.WIDTH($bits(c2cw_ent_t)), .DEPTH(C2CW_DEPTH)) u_c2cw (
    .clk, .rst_n, .push(cw_push), .din(cw_din), .pop(cw_pop),
    .head(cw_head), .empty(cw_empty), .full(cw_full), .count(cw_count));

  // ---------------------------------------------------------------- snooping
  always_comb begin
    ccc_push = bus_in.valid && (bus_in.kind == TX_RSP || bus_in.kind == TX_RP);
    ccc_din  = '{kind: bus_in.kind, src: bus_in.src, addr: bus_in.addr};
    dr_push  = bus_in.valid && (bus_in.kind == TX_HDR || bus_in.kind == TX_C2CW)
               && (bus_in.dst == MY_ID);
    dr_din   = '{a: bus_in.addr, d: bus_in.data,
                 shared: (bus_in.kind == TX_HDR) && bus_in.shared};
  end

  // ---------------------------------------------------------------- CCC head
  logic        ccc_own, ccc_stall_cw, ccc_stall_own, ccc_fire;
  ccr_e        ccc_ccr;
  line_state_e ccc_st;
  always_comb begin
    ccc_own       = (ccc_head.src == MY_ID);
    ccc_st        = line_st[ccc_head.addr];
    ccc_stall_cw  = !ccc_own && (cw_pend[ccc_head.addr] != '0);
    ccc_stall_own = !ccc_own && miss_owned && (miss_addr == ccc_head.addr);
    ccc_ccr       = CCR_OK;
    if (!ccc_own) begin
      unique case (ccc_st)
        LS_INVALID:    ccc_ccr = CCR_OK;
        LS_SHARED,
        LS_PRIV_CLEAN: ccc_ccr = (ccc_head.kind == TX_RSP) ? CCR_SHARED : CCR_OK;
        LS_DIRTY:      ccc_ccr = CCR_COPYOUT;
      endcase
    end
    ccc_fire = !ccc_empty && !ccc_hold && ccr_ready && !ccc_stall_cw && !ccc_stall_own
               && !(ccc_ccr == CCR_COPYOUT && cw_full);
    ccc_pop   = ccc_fire;
    ccr_valid = ccc_fire;
    ccr       = ccc_ccr;
    ccr_delay_c2cw = !ccc_empty && ccc_stall_cw;
    ccr_delay_own  = !ccc_empty && !ccc_stall_cw && ccc_stall_own;
  end

  // ---------------------------------------------------------------- processor side
  logic hit, start_miss, complete;
  always_comb begin
    hit = 1'b0;
    if (req.valid && !miss_active && !(ccc_fire && ccc_head.addr == req.addr)) begin
      if (req.we) hit = (line_st[req.addr] == LS_PRIV_CLEAN) || (line_st[req.addr] == LS_DIRTY);
      else        hit = (line_st[req.addr] != LS_INVALID);
    end
    start_miss = req.valid && !miss_active && !hit;
    complete   = miss_owned && !dr_empty && (dr_head.a == miss_addr);
    dr_pop     = complete;
    rsp.done   = hit || complete;
    rsp.rdata  = complete ? dr_head.d : line_d[req.addr];
  end

  // ---------------------------------------------------------------- bus side
  logic drive_cw, drive_miss;
  always_comb begin
    arb_hipri  = !cw_empty;
    arb_coh    = cw_empty && miss_active && !miss_issued;
    arb_req    = (arb_hipri || arb_coh) && !arb_grant;   // dropped in the granted cycle
    drive_cw   = arb_grant && !cw_empty;
    drive_miss = arb_grant && cw_empty && miss_active && !miss_issued;
    cw_pop     = drive_cw;
    bus_out    = '0;
    if (drive_cw) begin
      bus_out = '{valid: 1'b1, kind: TX_C2CW, src: MY_ID, dst: cw_head.dst,
                  addr: cw_head.a, data: cw_head.d, shared: 1'b0};
    end else if (drive_miss) begin
      bus_out = '{valid: 1'b1, kind: miss_kind, src: MY_ID, dst: MY_ID,
                  addr: miss_addr, data: '0, shared: 1'b0};
    end
    cw_push = ccc_fire && (ccc_ccr == CCR_COPYOUT);
    cw_din  = '{dst: ccc_head.src, a: ccc_head.addr, d: line_d[ccc_head.addr]};
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_active <= 1'b0;
      miss_issued <= 1'b0;
      miss_owned  <= 1'b0;
      miss_kind   <= TX_RSP;
      miss_addr   <= '0;
      for (int a = 0; a < NADDR; a++) begin
        line_st[a] <= LS_INVALID;
        line_d[a]  <= '0;
        cw_pend[a] <= '0;
      end
    end else begin
      if (start_miss) begin
        miss_active <= 1'b1;
        miss_kind   <= req.we ? TX_RP : TX_RSP;
        miss_addr   <= req.addr;
      end
      if (drive_miss) miss_issued <= 1'b1;

      // CCC head processing
      if (ccc_fire) begin
        if (ccc_own) begin
          miss_owned <= 1'b1;
          line_st[ccc_head.addr] <= LS_INVALID;   // transient: owned, data awaited
        end else begin
          unique case (ccc_st)
            LS_INVALID: ;
            LS_SHARED, LS_PRIV_CLEAN:
              line_st[ccc_head.addr] <= (ccc_head.kind == TX_RSP) ? LS_SHARED : LS_INVALID;
            LS_DIRTY:
              line_st[ccc_head.addr] <= LS_INVALID;
          endcase
        end
      end

      // processor write hit
      if (hit && req.we) begin
        line_st[req.addr] <= LS_DIRTY;
        line_d[req.addr]  <= req.wdata;
      end

      // miss completion: data used by the waiting access
      if (complete) begin
        miss_active <= 1'b0;
        miss_issued <= 1'b0;
        miss_owned  <= 1'b0;
        if (miss_kind == TX_RP) begin
          line_st[miss_addr] <= LS_DIRTY;
          line_d[miss_addr]  <= req.wdata;
        end else begin
          line_st[miss_addr] <= dr_head.shared ? LS_SHARED : LS_PRIV_CLEAN;
          line_d[miss_addr]  <= dr_head.d;
        end
      end

      // per-line count of queued c2cw
      for (int a = 0; a < NADDR; a++) begin
        cw_pend[a] <= cw_pend[a] + C2W'(cw_push && cw_din.a == addr_t'(a))
                                 - C2W'(cw_pop && cw_head.a == addr_t'(a));
      end
    end
  end

  a_dr_room:   assert property (@(posedge clk) disable iff (!rst_n) dr_push |-> !dr_full);
  a_ccc_room:  assert property (@(posedge clk) disable iff (!rst_n) ccc_push |-> !ccc_full);
  a_dr_match:  assert property (@(posedge clk) disable iff (!rst_n)
                                !dr_empty |-> miss_active && dr_head.a == miss_addr);
  a_hold_req:  assert property (@(posedge clk) disable iff (!rst_n)
                                miss_active && !complete |=> req.valid && req.addr == miss_addr);
endmodule
