// tb_tmc_top: end-to-end test of the four memory systems under the test automata.
//
// For each test (ROWO, WA, PO) the testbench runs a number of episodes. Every episode
// resets the design, then lets the automata run with random guesses (a transition is
// taken with probability 1/4 per step) while lazy caching's internal events are chosen at
// random. After a fixed number of cycles it checks, for all four memory systems:
//   - no safety property failed (all four systems are sequentially consistent),
//   - every automaton made progress (no deadlock, no lost response),
// and over all episodes that every property's antecedent was reached on every system.
// It also counts how often each Runway mechanism occurred (ccr held back for a queued
// c2cw, ccr held back for an owned outstanding miss, copyout, hdr with the shared
// indication, flow-control hold) and each lazy caching event, and fails for any that
// never occurred, and likewise for the abstracted model (hdr held by its counter, c2cw
// waiting for its sender's write, data-returned bit, copyout, shared hdr). The design
// runs at its default sizes.
`timescale 1ns/1ps
module tb_tmc_top;
  import tmc_pkg::*;

  localparam int EPISODES = 40;
  localparam int CYCLES   = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  test_mode_e mode;
  logic [3:0] run;
  logic [3:0] rw_ccc_hold;
  logic [1:0] choice [4][4];
  logic lc_ev_valid, lc_ev_fired;
  lc_event_e lc_ev_kind;
  logic [1:0] lc_ev_proc;
  addr_t lc_ev_addr;
  logic [3:0] hit_monotonic, hit_atomic, hit_po_cross;
  logic [3:0] viol_monotonic, viol_atomic, viol_po_cross;
  logic [15:0] steps [4][4];
  rw_bus_t rw_bus;
  logic [3:0] rw_ccr_delay_c2cw, rw_ccr_delay_own;
  logic rw_copyout, rw_coh_blocked;
  rw_bus_t urm_bus;
  logic urm_hdr_held, urm_copyout, urm_coh_blocked;
  logic [3:0] urm_dr_bit, urm_copyout_wait;

  tmc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_delay_c2cw = 0, n_delay_own = 0, n_copyout = 0, n_hdr_shared = 0,
      n_c2cw = 0, n_blocked = 0, n_rsp = 0, n_rp = 0;
  int n_ev [4] = '{0, 0, 0, 0};
  int n_hit_mono [4] = '{0, 0, 0, 0};
  int n_hit_atom [4] = '{0, 0, 0, 0};
  int n_hit_po [4] = '{0, 0, 0, 0};
  int u_held = 0, u_copyout = 0, u_dr = 0, u_wait = 0, u_blocked = 0, u_c2cw = 0, u_hdr_shared = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // random stimulus
  always @(negedge clk) begin
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 4; p++)
        choice[s][p] = (($urandom % 4) == 0) ? 2'($urandom) : 2'b00;
    for (int c = 0; c < 4; c++) rw_ccc_hold[c] = ($urandom % 4) == 0;
    if (rst_n) for (int p = 0; p < 4; p++) if (($urandom % 64) == 0) run[p] = ~run[p];
    lc_ev_valid = 1'b1;
    lc_ev_kind  = lc_event_e'($urandom % 4);
    if (lc_ev_kind == EV_CI && ($urandom % 3) != 0) lc_ev_kind = EV_CU;
    lc_ev_proc  = 2'($urandom);
    lc_ev_addr  = addr_t'($urandom);
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    n_delay_c2cw += $countones(rw_ccr_delay_c2cw);
    n_delay_own  += $countones(rw_ccr_delay_own);
    n_copyout    += int'(rw_copyout);
    n_blocked    += int'(rw_coh_blocked);
    if (rw_bus.valid) begin
      if (rw_bus.kind == TX_HDR && rw_bus.shared) n_hdr_shared++;
      if (rw_bus.kind == TX_C2CW) n_c2cw++;
      if (rw_bus.kind == TX_RSP)  n_rsp++;
      if (rw_bus.kind == TX_RP)   n_rp++;
    end
    if (lc_ev_fired) n_ev[lc_ev_kind]++;
    u_held    += int'(urm_hdr_held);
    u_copyout += int'(urm_copyout);
    u_dr      += $countones(urm_dr_bit);
    u_wait    += $countones(urm_copyout_wait);
    u_blocked += int'(urm_coh_blocked);
    if (urm_bus.valid && urm_bus.kind == TX_C2CW) u_c2cw++;
    if (urm_bus.valid && urm_bus.kind == TX_HDR && urm_bus.shared) u_hdr_shared++;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = '0;
    mode = MODE_ROWO;
    for (int m = 0; m < 3; m++) begin
      for (int e = 0; e < EPISODES; e++) begin
        int used;
        mode  = test_mode_e'(m);
        used  = (mode == MODE_WA) ? 4 : 2;
        rst_n = 1'b0;
        run   = '0;
        repeat (3) @(posedge clk);
        @(negedge clk) rst_n = 1'b1;
        run = '1;
        repeat (CYCLES) @(posedge clk);
        run = '1;
        repeat (200) @(posedge clk);
        #1;
        for (int s = 0; s < 4; s++) begin
          check(!viol_monotonic[s], $sformatf("MONOTONIC failed sys %0d mode %0d ep %0d", s, m, e));
          check(!viol_atomic[s],    $sformatf("ATOMIC failed sys %0d mode %0d ep %0d", s, m, e));
          check(!viol_po_cross[s],  $sformatf("PO_CROSS failed sys %0d mode %0d ep %0d", s, m, e));
          for (int p = 0; p < used; p++)
            check(steps[s][p] > 16'd5,
                  $sformatf("no progress sys %0d port %0d mode %0d ep %0d (%0d steps)",
                            s, p, m, e, steps[s][p]));
          n_hit_mono[s] += int'(hit_monotonic[s]);
          n_hit_atom[s] += int'(hit_atomic[s]);
          n_hit_po[s]   += int'(hit_po_cross[s]);
        end
      end
    end
    for (int s = 0; s < 4; s++) begin
      $display("system %0d: episodes reaching MONOTONIC=%0d ATOMIC=%0d PO_CROSS=%0d",
               s, n_hit_mono[s], n_hit_atom[s], n_hit_po[s]);
      check(n_hit_mono[s] > 0, $sformatf("MONOTONIC antecedent never reached, system %0d", s));
      check(n_hit_atom[s] > 0, $sformatf("ATOMIC antecedent never reached, system %0d", s));
      check(n_hit_po[s] > 0,   $sformatf("PO_CROSS antecedent never reached, system %0d", s));
    end
    $display("runway: rsp=%0d rp=%0d c2cw=%0d hdr_shared=%0d copyout=%0d delay_c2cw=%0d delay_own=%0d flow_hold=%0d",
             n_rsp, n_rp, n_c2cw, n_hdr_shared, n_copyout, n_delay_c2cw, n_delay_own, n_blocked);
    $display("lazy: MW=%0d MR=%0d CU=%0d CI=%0d", n_ev[0], n_ev[1], n_ev[2], n_ev[3]);
    check(n_rsp > 0 && n_rp > 0, "no rsp or no rp on Runway");
    check(n_c2cw > 0,       "no c2cw on Runway");
    check(n_copyout > 0,    "no copyout resolved by HOST");
    check(n_hdr_shared > 0, "no hdr with shared indication");
    check(n_delay_c2cw > 0, "ccr never delayed for a queued c2cw");
    check(n_delay_own > 0,  "ccr never delayed for an owned outstanding miss");
    check(n_blocked > 0,    "bus flow control never held a coherent request");
    $display("urm: c2cw=%0d hdr_shared=%0d copyout=%0d hdr_held=%0d c2cw_wait=%0d dr_bit=%0d flow_hold=%0d",
             u_c2cw, u_hdr_shared, u_copyout, u_held, u_wait, u_dr, u_blocked);
    check(u_c2cw > 0 && u_copyout > 0, "abstracted model: no copyout / c2cw");
    check(u_hdr_shared > 0, "abstracted model: no hdr with shared indication");
    check(u_held > 0,  "abstracted model: hdr never held by its c2cw counter");
    check(u_wait > 0,  "abstracted model: c2cw never waited for its sender's write");
    check(u_dr > 0,    "abstracted model: data-returned bit never set");
    for (int k = 0; k < 4; k++) check(n_ev[k] > 0, $sformatf("lazy caching event %0d never fired", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
