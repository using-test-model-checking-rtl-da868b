// urm_system: the queue-abstracted Runway-PA8000 model. It has NCLIENT urm_clients, a
// urm_host and the shared pipelined runway_arbiter on one bus.
//
// This is the same snoopy protocol as runway_system, with the snoop (CCC), coherency
// response (CCR) and data return (DR) queues taken out:
//   * clients answer every coherent transaction in the cycle it is on the bus;
//   * HOST queues an hdr with a counter of the c2cws still due for that line, and holds
//     the hdr until the counter is zero;
//   * clients keep one bit per line for data returned before it can be used.
// Processor accesses use the blocking port of tmc_pkg, one per client.
//
// Bus and arbitration are as in runway_system: one transaction per cycle, users
// 0..NCLIENT-1 are the clients, user NCLIENT is HOST, c2cw has the highest priority, and
// a request in cycle N gives mastership in N+2. Flow control (this design's own): new
// rsp/rp are granted only while the HDR queue has room for two more.
//
// Observation outputs: bus; hdr_held (an hdr waits for pending c2cws); copyout (a
// transaction answered by a copyout); dr_bit (a client's data-returned bit is set);
// copyout_wait (a client's c2cw waits for its own write to complete); coh_blocked.
module urm_system
  import tmc_pkg::*;
#(
  parameter int unsigned NCLIENT    = 4,
  parameter int unsigned C2CW_DEPTH = 2,
  parameter int unsigned HDR_DEPTH  = 4,
  parameter int unsigned CNT_W      = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req [NCLIENT],
  output mem_rsp_t rsp [NCLIENT],
  output rw_bus_t  bus,
  output logic     hdr_held,
  output logic     copyout,
  output logic [NCLIENT-1:0] dr_bit,
  output logic [NCLIENT-1:0] copyout_wait,
  output logic     coh_blocked
);
  localparam int unsigned NUSER = NCLIENT + 1;
  localparam int unsigned HCW   = $clog2(HDR_DEPTH + 1);

  logic [NUSER-1:0] arb_req, arb_hipri, arb_coh, arb_grant;
  rw_bus_t          bus_drv [NUSER];
  ccr_e             ccr     [NCLIENT];
  logic [HCW-1:0]   hdr_count;
  logic             coh_allow;

  for (genvar c = 0; c < NCLIENT; c++) begin : g_client
    urm_client #(.ID(c), .C2CW_DEPTH(C2CW_DEPTH)) u_client (
      .clk, .rst_n,
      .req(req[c]), .rsp(rsp[c]),
      .arb_req(arb_req[c]), .arb_hipri(arb_hipri[c]), .arb_coh(arb_coh[c]),
      .arb_grant(arb_grant[c]),
      .bus_out(bus_drv[c]), .bus_in(bus),
      .ccr(ccr[c]),
      .dr_bit_set(dr_bit[c]), .copyout_pending(copyout_wait[c])
    );
  end

  urm_host #(.NCLIENT(NCLIENT), .HDR_DEPTH(HDR_DEPTH), .CNT_W(CNT_W)) u_host (
    .clk, .rst_n, .ccr,
    .arb_req(arb_req[NCLIENT]), .arb_grant(arb_grant[NCLIENT]),
    .bus_out(bus_drv[NCLIENT]), .bus_in(bus),
    .hdr_count, .hdr_held, .resolved_copyout(copyout)
  );
  assign arb_hipri[NCLIENT] = 1'b0;
  assign arb_coh[NCLIENT]   = 1'b0;

  always_comb begin
    coh_allow   = (hdr_count <= HCW'(HDR_DEPTH - 2));
    coh_blocked = !coh_allow && |(arb_coh);
  end

  runway_arbiter #(.NUSER(NUSER)) u_arb (
    .clk, .rst_n, .req(arb_req), .hipri(arb_hipri), .coh(arb_coh),
    .coh_allow, .grant(arb_grant)
  );

  always_comb begin
    bus = '0;
    for (int u = 0; u < NUSER; u++) bus |= bus_drv[u];
  end
endmodule
