// tb_runway_host: self-checking test of the HOST memory controller (four clients).
//
// The testbench puts coherent transactions on the bus, feeds the clients' ccrs one by one
// and grants the bus whenever HOST asks. It checks that nothing is decided before every
// client has answered, that an hdr goes to the requester with the Client_op shared flag
// set exactly when some ccr is coh_shared, that no hdr is produced when a ccr is
// coh_copyout, that a c2cw on the bus updates memory so a later hdr carries that data,
// and that transactions are answered in bus order.
`timescale 1ns/1ps
module tb_runway_host;
  import tmc_pkg::*;
  localparam int NC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ccr_valid [NC];
  ccr_e ccr [NC];
  logic ccr_ready [NC];
  logic arb_req, arb_grant;
  rw_bus_t bus_out, bus_in, tb_bus;
  logic [2:0] ord_count;
  logic resolved, resolved_copyout;

  runway_host #(.NCLIENT(NC), .CCR_DEPTH(4), .ORD_DEPTH(4), .HDR_DEPTH(2)) dut (.*);
  always #5 clk = ~clk;
  assign bus_in = bus_out.valid ? bus_out : tb_bus;
  always_ff @(posedge clk) arb_grant <= rst_n && arb_req && !arb_grant;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  rw_bus_t outs [$];
  always @(posedge clk) if (rst_n && bus_out.valid) outs.push_back(bus_out);

  task automatic drive(input rw_txn_e k, input int src, input int dst, input addr_t a, input data_t d);
    @(negedge clk);
    tb_bus = '{valid: 1'b1, kind: k, src: id_t'(src), dst: id_t'(dst), addr: a, data: d, shared: 1'b0};
    @(negedge clk);
    tb_bus = '0;
  endtask

  task automatic answer(input int c, input ccr_e e);
    @(negedge clk);
    ccr_valid[c] = 1'b1; ccr[c] = e;
    @(negedge clk);
    ccr_valid[c] = 1'b0;
  endtask

  task automatic expect_hdr(input int dst, input addr_t a, input data_t d, input logic sh, input string what);
    int t = 0;
    while (outs.size() == 0 && t < 10) begin @(negedge clk); t++; end
    if (outs.size() == 0) check(1'b0, {what, ": no hdr"});
    else begin
      rw_bus_t g = outs.pop_front();
      check(g.kind == TX_HDR && g.dst == id_t'(dst) && g.addr == a && g.data == d && g.shared == sh
            && g.src == id_t'(NC), {what, ": hdr fields"});
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nres;
    tb_bus = '0;
    for (int c = 0; c < NC; c++) begin ccr_valid[c] = 1'b0; ccr[c] = CCR_OK; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // rsp from client 1, one client answers shared
    drive(TX_RSP, 1, 1, ADDR_A, '0);
    check(ord_count == 3'd1, "transaction recorded in order queue");
    answer(0, CCR_OK); answer(1, CCR_OK); answer(2, CCR_SHARED);
    repeat (3) @(negedge clk);
    check(outs.size() == 0 && !arb_req, "no decision before all clients answered");
    answer(3, CCR_OK);
    expect_hdr(1, ADDR_A, 1'b0, 1'b1, "hdr with shared flag");

    // rp from client 2, all coh_ok -> hdr not shared
    drive(TX_RP, 2, 2, ADDR_B, '0);
    for (int c = 0; c < NC; c++) answer(c, CCR_OK);
    expect_hdr(2, ADDR_B, 1'b0, 1'b0, "hdr without shared flag");

    // rp from client 3 with client 0 copying out: no hdr; c2cw updates memory
    nres = 0;
    drive(TX_RP, 3, 3, ADDR_A, '0);
    answer(1, CCR_OK); answer(2, CCR_OK); answer(3, CCR_OK);
    @(negedge clk); ccr_valid[0] = 1'b1; ccr[0] = CCR_COPYOUT;
    @(negedge clk); ccr_valid[0] = 1'b0;
    #1 check(resolved && resolved_copyout, "copyout resolved without hdr");
    repeat (4) @(negedge clk);
    check(outs.size() == 0, "no hdr after copyout");
    drive(TX_C2CW, 0, 3, ADDR_A, 1'b1);
    check(dut.mem[ADDR_A] == 1'b1, "c2cw data written into memory");

    // two transactions back to back, answered in order
    drive(TX_RSP, 0, 0, ADDR_A, '0);
    drive(TX_RSP, 2, 2, ADDR_B, '0);
    check(ord_count == 3'd2, "two transactions queued");
    for (int c = 0; c < NC; c++) answer(c, CCR_OK);
    for (int c = 0; c < NC; c++) answer(c, (c == 1) ? CCR_SHARED : CCR_OK);
    expect_hdr(0, ADDR_A, 1'b1, 1'b0, "first hdr carries c2cw-updated data");
    expect_hdr(2, ADDR_B, 1'b0, 1'b1, "second hdr in bus order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
