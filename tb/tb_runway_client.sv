// tb_runway_client: self-checking test of one PA8000 Runway client (ID 1).
//
// The testbench plays the rest of the system: it grants the bus one cycle after a
// request (when allowed), loops the client's own bus cycles back to its snoop input, and
// injects other clients' transactions and data returns. It checks every row of the ccr
// table, the state changes behind them, the c2cw supplied for a dirty line, the c2cw
// priority request, the ccr delay while a c2cw for the line is queued, the ccr delay while
// an owned miss awaits its data, and that data returned before the client's own
// transaction was processed is not used until then.
`timescale 1ns/1ps
module tb_runway_client;
  import tmc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t req;
  mem_rsp_t rsp;
  logic arb_req, arb_hipri, arb_coh, arb_grant;
  rw_bus_t bus_out, bus_in, tb_bus;
  logic ccr_valid, ccr_ready, ccc_hold;
  ccr_e ccr;
  logic [2:0] ccc_count;
  logic ccr_delay_c2cw, ccr_delay_own;

  runway_client #(.ID(1), .CCC_DEPTH(4), .DR_DEPTH(2), .C2CW_DEPTH(2)) dut (.*);
  always #5 clk = ~clk;
  assign bus_in = bus_out.valid ? bus_out : tb_bus;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus grant model
  logic allow_grant;
  always_ff @(posedge clk) arb_grant <= rst_n && allow_grant && arb_req && !arb_grant;

  // record ccrs and bus cycles driven by the client
  ccr_e    ccrs [$];
  rw_bus_t outs [$];
  int n_delay_c2cw = 0, n_delay_own = 0;
  always @(posedge clk) if (rst_n) begin
    if (ccr_valid) ccrs.push_back(ccr);
    if (bus_out.valid) outs.push_back(bus_out);
    if (ccr_delay_c2cw) n_delay_c2cw++;
    if (ccr_delay_own)  n_delay_own++;
  end

  task automatic drive(input rw_txn_e k, input int src, input int dst, input addr_t a,
                       input data_t d, input logic sh);
    @(negedge clk);
    tb_bus = '{valid: 1'b1, kind: k, src: id_t'(src), dst: id_t'(dst), addr: a, data: d, shared: sh};
    @(negedge clk);
    tb_bus = '0;
  endtask

  task automatic expect_ccr(input ccr_e e, input string what);
    int t = 0;
    while (ccrs.size() == 0 && t < 20) begin @(negedge clk); t++; end
    if (ccrs.size() == 0) check(1'b0, {what, ": no ccr"});
    else begin
      ccr_e g = ccrs.pop_front();
      check(g == e, $sformatf("%s: ccr %s, expected %s", what, g.name(), e.name()));
    end
  endtask

  task automatic expect_out(input rw_txn_e k, input int dst, input addr_t a, input data_t d,
                            input string what);
    int t = 0;
    while (outs.size() == 0 && t < 20) begin @(negedge clk); t++; end
    if (outs.size() == 0) check(1'b0, {what, ": nothing driven"});
    else begin
      rw_bus_t g = outs.pop_front();
      check(g.kind == k && g.addr == a && g.src == 3'd1, {what, ": kind/addr/src"});
      if (k == TX_C2CW) check(g.dst == id_t'(dst) && g.data == d, {what, ": c2cw dst/data"});
    end
  endtask

  task automatic wait_done(input data_t d, input bit is_read, input string what);
    int t = 0;
    while (!rsp.done && t < 30) begin @(negedge clk); #1; t++; end
    check(rsp.done, {what, ": access never completed"});
    if (is_read) check(rsp.rdata == d, {what, ": read data"});
    @(negedge clk) req = '0;
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; tb_bus = '0; ccr_ready = 1'b1; ccc_hold = 1'b0; allow_grant = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1: read miss -> rsp, own ccr coh_ok, hdr (not shared) -> private-clean
    req = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: '0};
    expect_out(TX_RSP, 0, ADDR_A, '0, "read miss issues rsp");
    expect_ccr(CCR_OK, "own rsp");
    #1 check(!rsp.done, "no data yet");
    drive(TX_HDR, 4, 1, ADDR_A, 1'b1, 1'b0);
    wait_done(1'b1, 1'b1, "read miss");
    check(dut.line_st[ADDR_A] == LS_PRIV_CLEAN, "line private-clean after unshared hdr");

    // 2: other's rsp on private-clean line -> coh_shared, shared
    drive(TX_RSP, 2, 2, ADDR_A, '0, 1'b0);
    expect_ccr(CCR_SHARED, "other rsp, private-clean");
    check(dut.line_st[ADDR_A] == LS_SHARED, "line shared");
    // other's rsp on shared line -> coh_shared
    drive(TX_RSP, 3, 3, ADDR_A, '0, 1'b0);
    expect_ccr(CCR_SHARED, "other rsp, shared");

    // 3: write to shared line -> rp; hdr -> dirty
    @(negedge clk) req = '{valid: 1'b1, we: 1'b1, addr: ADDR_A, wdata: 1'b0};
    expect_out(TX_RP, 0, ADDR_A, '0, "write to shared line issues rp");
    expect_ccr(CCR_OK, "own rp");
    drive(TX_HDR, 4, 1, ADDR_A, 1'b1, 1'b0);
    wait_done('0, 1'b0, "write miss");
    check(dut.line_st[ADDR_A] == LS_DIRTY, "line dirty after write");
    @(negedge clk) req = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: '0};
    #1 check(rsp.done && rsp.rdata == 1'b0, "read hit returns written data");
    @(negedge clk) req = '0;

    // 4: dirty line: copyout and c2cw; next ccr for the line waits for the c2cw
    allow_grant = 1'b0;
    ccc_hold = 1'b1;
    drive(TX_RP, 3, 3, ADDR_A, '0, 1'b0);
    drive(TX_RSP, 0, 0, ADDR_A, '0, 1'b0);
    ccc_hold = 1'b0;
    expect_ccr(CCR_COPYOUT, "other rp, dirty");
    repeat (2) @(negedge clk);
    #1 check(arb_req && arb_hipri, "c2cw requests at high priority");
    check(ccr_delay_c2cw, "ccr held while c2cw queued");
    check(ccrs.size() == 0, "no ccr while c2cw queued");
    check(dut.line_st[ADDR_A] == LS_INVALID, "copied-out line invalid");
    allow_grant = 1'b1;
    expect_out(TX_C2CW, 3, ADDR_A, 1'b0, "c2cw carries the dirty data to the requester");
    expect_ccr(CCR_OK, "ccr after c2cw went out");

    // 5: owned miss awaiting data delays the ccr for its line
    @(negedge clk) req = '{valid: 1'b1, we: 1'b0, addr: ADDR_B, wdata: '0};
    expect_out(TX_RSP, 0, ADDR_B, '0, "read miss on B");
    expect_ccr(CCR_OK, "own rsp B");
    drive(TX_RP, 2, 2, ADDR_B, '0, 1'b0);
    repeat (3) @(negedge clk);
    #1 check(ccr_delay_own && ccrs.size() == 0, "ccr held while owned miss awaits data");
    drive(TX_HDR, 4, 1, ADDR_B, 1'b1, 1'b0);
    wait_done(1'b1, 1'b1, "read of B completes");
    expect_ccr(CCR_OK, "rp on private-clean line after data was used");
    check(dut.line_st[ADDR_B] == LS_INVALID, "line invalid after other's rp");

    // 6: data returned before own transaction is processed is held in DR
    ccc_hold = 1'b1;
    @(negedge clk) req = '{valid: 1'b1, we: 1'b0, addr: ADDR_A, wdata: '0};
    expect_out(TX_RSP, 0, ADDR_A, '0, "read miss on A again");
    drive(TX_C2CW, 0, 1, ADDR_A, 1'b1, 1'b0);
    repeat (3) @(negedge clk);
    #1 check(!rsp.done, "early data not used before ownership");
    ccc_hold = 1'b0;
    expect_ccr(CCR_OK, "own rsp processed");
    wait_done(1'b1, 1'b1, "read completes after ownership");
    check(dut.line_st[ADDR_A] == LS_PRIV_CLEAN, "line from c2cw private-clean");

    // 7: other's rp on private-clean line -> coh_ok, invalid; other's on invalid -> coh_ok
    drive(TX_RP, 0, 0, ADDR_A, '0, 1'b0);
    expect_ccr(CCR_OK, "other rp, private-clean");
    check(dut.line_st[ADDR_A] == LS_INVALID, "invalid after other's rp");
    drive(TX_RSP, 2, 2, ADDR_A, '0, 1'b0);
    expect_ccr(CCR_OK, "other rsp, invalid");

    check(n_delay_c2cw > 0 && n_delay_own > 0, "both ccr delays seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
