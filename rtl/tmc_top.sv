// tmc_top: test model-checking of four memory systems side by side.
//
// The same ARCHTEST test automata (tmc_harness, test chosen by mode) drive each of four
// four-processor memory systems:
//   system 0  serial_mem      the serial memory, sequentially consistent by definition
//   system 1  lazy_cache_mem  lazy caching, caches with in- and out-queues
//   system 2  runway_system   the Runway-PA8000 bus with four PA8000 clients and HOST
//   system 3  urm_system      the same bus with its snoop and data return queues
//                             abstracted away (immediate responses, hdr counters)
// Each harness reports, per memory rule safety property, whether its antecedent was
// reached (hit_*) and whether it failed (viol_*), as 4-bit vectors indexed by system.
// A sequentially consistent memory never raises viol_* in modes MODE_WA and MODE_PO, and
// the two tests together cover A(CMP, PO, WA).
//
// All nondeterminism is brought out as inputs: the automata guesses (choice, per system
// and port) and lazy caching's choice of internal event (lc_ev_*). Random stimulus on them
// explores schedules. run[p] pauses processor p of every system; rw_ccc_hold[c] pauses
// the snoop processing of Runway client c. Both buses and their mechanism flags are
// brought out for observation. For system 2: a ccr held back for a queued c2cw or for an
// owned outstanding miss, data supplied by copyout, coherent requests held by flow
// control. For system 3: an hdr held by its counter, a copyout, a c2cw waiting for its
// sender's write, the data-returned bit, flow control.
//
// Timing: every system answers on the blocking port of tmc_pkg; mode may change only
// while rst_n is low. Running the systems side by side, and the ports, are this design's
// choices.
module tmc_top
  import tmc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  test_mode_e mode,
  input  logic [3:0] run,
  input  logic [3:0] rw_ccc_hold,
  input  logic [1:0] choice [4][4],
  input  logic       lc_ev_valid,
  input  lc_event_e  lc_ev_kind,
  input  logic [1:0] lc_ev_proc,
  input  addr_t      lc_ev_addr,
  output logic       lc_ev_fired,
  output logic [3:0] hit_monotonic,
  output logic [3:0] hit_atomic,
  output logic [3:0] hit_po_cross,
  output logic [3:0] viol_monotonic,
  output logic [3:0] viol_atomic,
  output logic [3:0] viol_po_cross,
  output logic [15:0] steps [4][4],
  output rw_bus_t    rw_bus,
  output logic [3:0] rw_ccr_delay_c2cw,
  output logic [3:0] rw_ccr_delay_own,
  output logic       rw_copyout,
  output logic       rw_coh_blocked,
  output rw_bus_t    urm_bus,
  output logic       urm_hdr_held,
  output logic       urm_copyout,
  output logic [3:0] urm_dr_bit,
  output logic [3:0] urm_copyout_wait,
  output logic       urm_coh_blocked
);
  mem_req_t req [4][4];
  mem_rsp_t rsp [4][4];

  for (genvar s = 0; s < 4; s++) begin : g_harness
    tmc_harness u_harness (
      .clk, .rst_n, .mode, .run, .choice(choice[s]),
      .req(req[s]), .rsp(rsp[s]),
      .hit_monotonic(hit_monotonic[s]), .hit_atomic(hit_atomic[s]),
      .hit_po_cross(hit_po_cross[s]),
      .viol_monotonic(viol_monotonic[s]), .viol_atomic(viol_atomic[s]),
      .viol_po_cross(viol_po_cross[s]),
      .steps(steps[s])
    );
  end

  serial_mem #(.NPROC(4)) u_serial (
    .clk, .rst_n, .req(req[0]), .rsp(rsp[0])
  );

  lazy_cache_mem #(.NPROC(4)) u_lazy (
    .clk, .rst_n, .req(req[1]), .rsp(rsp[1]),
    .ev_valid(lc_ev_valid), .ev_kind(lc_ev_kind), .ev_proc(lc_ev_proc),
    .ev_addr(lc_ev_addr), .ev_fired(lc_ev_fired)
  );

  runway_system #(.NCLIENT(4)) u_runway (
    .clk, .rst_n, .req(req[2]), .rsp(rsp[2]), .ccc_hold(rw_ccc_hold),
    .bus(rw_bus), .ccr_delay_c2cw(rw_ccr_delay_c2cw), .ccr_delay_own(rw_ccr_delay_own),
    .copyout(rw_copyout), .coh_blocked(rw_coh_blocked)
  );

  urm_system #(.NCLIENT(4)) u_urm (
    .clk, .rst_n, .req(req[3]), .rsp(rsp[3]),
    .bus(urm_bus), .hdr_held(urm_hdr_held), .copyout(urm_copyout),
    .dr_bit(urm_dr_bit), .copyout_wait(urm_copyout_wait), .coh_blocked(urm_coh_blocked)
  );
endmodule
