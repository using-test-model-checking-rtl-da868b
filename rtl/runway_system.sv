// runway_system: the Runway-PA8000 memory system: NCLIENT PA8000 clients and the HOST
// memory controller on one synchronous, split-transaction bus.
//
// Each processor port (req/rsp) enters one runway_client. A miss becomes an rsp or rp
// transaction on the bus; every client and HOST snoop it; each client answers with a
// cache coherency response into its CCR queue at HOST; the data comes back later as an
// hdr from HOST or as a c2cw from the client that held the line dirty. Transactions of
// different processors therefore complete out of order, while each processor's accesses
// complete in program order.
//
// The bus carries one transaction per cycle, driven by the user that runway_arbiter
// granted for that cycle (users 0..NCLIENT-1 are the clients, user NCLIENT is HOST).
// Bus flow control is this design's own: new coherent transactions are granted only
// while every snoop queue (the clients' CCC queues and HOST's order queue) has room for
// two more, covering the transaction on the bus and the one already granted for the next
// cycle.
//
// ccc_hold[c] pauses client c's CCC processing for a cycle: each client works off its
// snooped transactions at its own pace, and this input makes that pace a free choice.
//
// Observation outputs: bus shows each bus cycle; ccr_delay_c2cw / ccr_delay_own flag a
// client holding back its ccr because of a queued c2cw or an outstanding owned miss;
// copyout flags a transaction whose data HOST left to a client.
module runway_system
  import tmc_pkg::*;
#(
  parameter int unsigned NCLIENT    = 4,
  parameter int unsigned CCC_DEPTH  = 4,
  parameter int unsigned CCR_DEPTH  = 4,
  parameter int unsigned DR_DEPTH   = 2,
  parameter int unsigned C2CW_DEPTH = 2,
  parameter int unsigned HDR_DEPTH  = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req [NCLIENT],
  output mem_rsp_t rsp [NCLIENT],
  input  logic [NCLIENT-1:0] ccc_hold,
  output rw_bus_t  bus,
  output logic [NCLIENT-1:0] ccr_delay_c2cw,
  output logic [NCLIENT-1:0] ccr_delay_own,
  output logic     copyout,
  output logic     coh_blocked
);
  localparam int unsigned NUSER = NCLIENT + 1;
  localparam int unsigned CCW   = $clog2(CCC_DEPTH + 1);

  logic [NUSER-1:0] arb_req, arb_hipri, arb_coh, arb_grant;
  rw_bus_t          bus_drv [NUSER];
  logic             ccr_valid [NCLIENT];
  ccr_e             ccr       [NCLIENT];
  logic             ccr_ready [NCLIENT];
  logic [CCW-1:0]   ccc_count [NCLIENT];
  logic [CCW-1:0]   ord_count;
  logic             coh_allow;
  logic             resolved;

  for (genvar c = 0; c < NCLIENT; c++) begin : g_client
    runway_client #(
      .ID(c), .CCC_DEPTH(CCC_DEPTH), .DR_DEPTH(DR_DEPTH), .C2CW_DEPTH(C2CW_DEPTH)
    ) u_client (
      .clk, .rst_n,
      .req(req[c]), .rsp(rsp[c]),
      .arb_req(arb_req[c]), .arb_hipri(arb_hipri[c]), .arb_coh(arb_coh[c]),
      .arb_grant(arb_grant[c]),
      .bus_out(bus_drv[c]), .bus_in(bus),
      .ccr_valid(ccr_valid[c]), .ccr(ccr[c]), .ccr_ready(ccr_ready[c]),
      .ccc_hold(ccc_hold[c]), .ccc_count(ccc_count[c]),
      .ccr_delay_c2cw(ccr_delay_c2cw[c]), .ccr_delay_own(ccr_delay_own[c])
    );
  end

  runway_host #(
    .NCLIENT(NCLIENT), .CCR_DEPTH(CCR_DEPTH), .ORD_DEPTH(CCC_DEPTH), .HDR_DEPTH(HDR_DEPTH)
  ) u_host (
    .clk, .rst_n,
    .ccr_valid, .ccr, .ccr_ready,
    .arb_req(arb_req[NCLIENT]), .arb_grant(arb_grant[NCLIENT]),
    .bus_out(bus_drv[NCLIENT]), .bus_in(bus),
    .ord_count,
    .resolved, .resolved_copyout(copyout)
  );
  assign arb_hipri[NCLIENT] = 1'b0;
  assign arb_coh[NCLIENT]   = 1'b0;

  always_comb begin
    coh_allow = (ord_count <= CCW'(CCC_DEPTH - 2));
    for (int c = 0; c < NCLIENT; c++)
      coh_allow &= (ccc_count[c] <= CCW'(CCC_DEPTH - 2));
    coh_blocked = !coh_allow && |(arb_coh);
  end

  runway_arbiter #(.NUSER(NUSER)) u_arb (
    .clk, .rst_n, .req(arb_req), .hipri(arb_hipri), .coh(arb_coh),
    .coh_allow, .grant(arb_grant)
  );

  // Only the granted user drives; the others drive all zeros.
  always_comb begin
    bus = '0;
    for (int u = 0; u < NUSER; u++) bus |= bus_drv[u];
  end
endmodule
