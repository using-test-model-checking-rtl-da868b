// lazy_cache_mem: lazy caching, a bus-oriented memory that implements sequential
// consistency with caches and decoupling queues.
//
// Each processor i has a cache C_i (a valid bit and a value per location), an out-queue
// Out_i of buffered writes (d, a) and an in-queue In_i of pending cache updates
// (d, a, star). There is one shared memory Mem, initially all 0. The rules:
//   W_i(d, a)  always allowed (while Out_i has room): append (d, a) to Out_i.
//   R_i(d, a)  allowed when C_i holds a with value d, Out_i is empty and In_i holds no
//              starred entry (a starred entry is an update caused by P_i's own write).
//   MW_i       head (d, a) of Out_i is written to Mem; (d, a) is appended to every other
//              in-queue and (d, a, star) to In_i.
//   MR_i(a)    (d, a) with d = Mem[a] is appended to In_i (a cache fill).
//   CU_i       the head of In_i is removed and written into C_i.
//   CI_i(a)    location a is dropped from C_i.
// Processor accesses use the blocking port of tmc_pkg: a write completes (done) in the
// cycle it is appended to Out_i, a read in the first cycle its condition holds.
//
// The protocol leaves open which internal event happens when. This module takes that
// choice as an input: in each cycle at most one internal event, named by ev_kind, ev_proc
// and ev_addr, is performed if ev_valid is set and the event is enabled (ev_fired shows
// it was). Driving these inputs at random explores the interleavings. The queue depths
// are bounded (QDEPTH); an event or write that would overflow a queue is not enabled.
// The star count per in-queue is kept as a counter, so "no starred entry" is one compare.
// Within a cycle the processor access is ordered before the internal event.
module lazy_cache_mem
  import tmc_pkg::*;
#(
  parameter int unsigned NPROC  = 4,
  parameter int unsigned QDEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mem_req_t  req [NPROC],
  output mem_rsp_t  rsp [NPROC],
  // choice of the next internal event
  input  logic      ev_valid,
  input  lc_event_e ev_kind,
  input  logic [$clog2(NPROC)-1:0] ev_proc,
  input  addr_t     ev_addr,
  output logic      ev_fired
);
  localparam int unsigned CW = $clog2(QDEPTH + 1);

  typedef struct packed { data_t d; addr_t a; } out_ent_t;
  typedef struct packed { logic star; data_t d; addr_t a; } in_ent_t;

  data_t    mem [NADDR];
  logic     c_valid [NPROC][NADDR];
  data_t    c_data  [NPROC][NADDR];
  logic [CW-1:0] star_cnt [NPROC];

  logic     out_push [NPROC], out_pop [NPROC], out_empty [NPROC], out_full [NPROC];
  out_ent_t out_din  [NPROC], out_head [NPROC];
  logic     in_push  [NPROC], in_pop  [NPROC], in_empty  [NPROC], in_full  [NPROC];
  in_ent_t  in_din   [NPROC], in_head  [NPROC];
  logic [CW-1:0] out_cnt [NPROC], in_cnt [NPROC];

  for (genvar i = 0; i < NPROC; i++) begin : g_q
    sync_fifo #(.WIDTH($bits(out_ent_t)), .DEPTH(QDEPTH)) u_out (
      .clk, .rst_n, .push(out_push[i]), .din(out_din[i]), .pop(out_pop[i]),
      .head(out_head[i]), .empty(out_empty[i]), .full(out_full[i]), .count(out_cnt[i]));
    sync_fifo #(.WIDTH($bits(in_ent_t)), .DEPTH(QDEPTH)) u_in (
      .clk, .rst_n, .push(in_push[i]), .din(in_din[i]), .pop(in_pop[i]),
      .head(in_head[i]), .empty(in_empty[i]), .full(in_full[i]), .count(in_cnt[i]));
  end

  // Processor accesses.
  logic rd_ok [NPROC];
  logic wr_ok [NPROC];
  always_comb begin
    for (int i = 0; i < NPROC; i++) begin
      rd_ok[i] = req[i].valid && !req[i].we && c_valid[i][req[i].addr]
                 && out_empty[i] && (star_cnt[i] == '0);
      wr_ok[i] = req[i].valid && req[i].we && !out_full[i];
      rsp[i].done  = rd_ok[i] || wr_ok[i];
      rsp[i].rdata = c_data[i][req[i].addr];
    end
  end

  // Internal event enables.
  logic any_in_full;
  logic mw_en, mr_en, cu_en, ci_en;
  always_comb begin
    any_in_full = 1'b0;
    for (int i = 0; i < NPROC; i++) any_in_full |= in_full[i];
    mw_en = !out_empty[ev_proc] && !any_in_full;
    mr_en = !in_full[ev_proc];
    cu_en = !in_empty[ev_proc];
    ci_en = 1'b1;
    unique case (ev_kind)
      EV_MW: ev_fired = ev_valid && mw_en;
      EV_MR: ev_fired = ev_valid && mr_en;
      EV_CU: ev_fired = ev_valid && cu_en;
      EV_CI: ev_fired = ev_valid && ci_en;
    endcase
  end

  // Queue controls.
  always_comb begin
    for (int i = 0; i < NPROC; i++) begin
      out_push[i] = wr_ok[i];
      out_din[i]  = '{d: req[i].wdata, a: req[i].addr};
      out_pop[i]  = ev_fired && (ev_kind == EV_MW) && (int'(ev_proc) == i);
      in_pop[i]   = ev_fired && (ev_kind == EV_CU) && (int'(ev_proc) == i);
      in_push[i]  = 1'b0;
      in_din[i]   = '0;
      if (ev_fired && ev_kind == EV_MW) begin
        in_push[i] = 1'b1;
        in_din[i]  = '{star: (int'(ev_proc) == i), d: out_head[ev_proc].d, a: out_head[ev_proc].a};
      end else if (ev_fired && ev_kind == EV_MR && int'(ev_proc) == i) begin
        in_push[i] = 1'b1;
        in_din[i]  = '{star: 1'b0, d: mem[ev_addr], a: ev_addr};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NADDR; a++) mem[a] <= '0;
      for (int i = 0; i < NPROC; i++) begin
        star_cnt[i] <= '0;
        for (int a = 0; a < NADDR; a++) begin
          c_valid[i][a] <= 1'b0;
          c_data[i][a]  <= '0;
        end
      end
    end else begin
      if (ev_fired && ev_kind == EV_MW)
        mem[out_head[ev_proc].a] <= out_head[ev_proc].d;
      for (int i = 0; i < NPROC; i++) begin
        // star count: +1 for a starred push, -1 for a starred pop
        star_cnt[i] <= star_cnt[i] + CW'(in_push[i] && in_din[i].star)
                                   - CW'(in_pop[i] && in_head[i].star);
        if (in_pop[i]) begin
          c_valid[i][in_head[i].a] <= 1'b1;
          c_data[i][in_head[i].a]  <= in_head[i].d;
        end
      end
      if (ev_fired && ev_kind == EV_CI)
        c_valid[ev_proc][ev_addr] <= 1'b0;
    end
  end
endmodule
