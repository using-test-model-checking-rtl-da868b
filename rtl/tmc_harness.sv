// tmc_harness: the test automata of one ARCHTEST test and the memory rule safety
// properties that watch them, driving the four processor ports of a memory system.
//
// mode selects the test (it must be held steady while run is high):
//   MODE_ROWO  Test_ROWO for A(CMP, RO, WO): port 0 writer of A, port 1 reader of A.
//              MONOTONIC: reader in s2 => x2 >= x1.
//   MODE_WA    Test_WA for A(CMP, RO, WO, WA): port 0 writer of A (P1), port 1 reader
//              of A then B (P2: u, v), port 2 reader of B then A (P3: x, y), port 3
//              writer of B (P4).
//              ATOMIC: P2 and P3 past s0 => v >= x or y >= u.
//              MONOTONIC: a reader in s2 => each of its locations read no smaller in
//              the second sample than in the first.
//   MODE_PO    Test_PO for A(CMP, PO): port 0 writes A and reads B (P1: y, j), port 1
//              writes B and reads A (P2: x, i).
//              PO_CROSS: both in s3 => (x >= j or y >= i) and (x <= j or y <= i).
// Unused ports are idle. choice[p] is the nondeterministic guess of the automaton on port
// p and run[p] lets it start new steps (holding it low makes that processor pause);
// driving both at random explores the schedules a model checker would enumerate.
//
// For each property, hit_* records that its antecedent has held at least once (the
// non-vacuity check) and viol_* that the property has failed; both are sticky until
// reset. The assignment of processors to ports and the sticky flags are this design's
// choices; automata and properties follow the test definitions.
module tmc_harness
  import tmc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  test_mode_e mode,
  input  logic [3:0] run,
  input  logic [1:0] choice [4],
  output mem_req_t   req [4],
  input  mem_rsp_t   rsp [4],
  output logic       hit_monotonic,
  output logic       hit_atomic,
  output logic       hit_po_cross,
  output logic       viol_monotonic,
  output logic       viol_atomic,
  output logic       viol_po_cross,
  output logic [15:0] steps [4]
);
  localparam mem_rsp_t NO_RSP = '0;

  logic is_rowo, is_wa, is_po;
  assign is_rowo = (mode == MODE_ROWO);
  assign is_wa   = (mode == MODE_WA);
  assign is_po   = (mode == MODE_PO);

  // ---------------------------------------------------------------- automata
  mem_req_t wa_req, wb_req, rr_req, p2_req, p3_req, po1_req, po2_req;
  mem_rsp_t wa_rsp, wb_rsp, rr_rsp, p2_rsp, p3_rsp, po1_rsp, po2_rsp;
  logic     wa_s1, wb_s1;
  logic [1:0] rr_st, p2_st, p3_st, po1_st, po2_st;
  data_t    rr_c1 [2], rr_c2 [2], p2_c1 [2], p2_c2 [2], p3_c1 [2], p3_c2 [2];
  data_t    po1_y, po2_x;
  logic     po1_j, po2_i;
  logic [15:0] wa_n, wb_n, rr_n, p2_n, p3_n, po1_n, po2_n;

  ta_writer #(.ADDR(ADDR_A)) u_wa (
    .clk, .rst_n, .enable(run[0] && (is_rowo || is_wa)), .choice(choice[0][0]),
    .req(wa_req), .rsp(wa_rsp), .in_s1(wa_s1), .steps(wa_n));
  ta_writer #(.ADDR(ADDR_B)) u_wb (
    .clk, .rst_n, .enable(run[3] && is_wa), .choice(choice[3][0]),
    .req(wb_req), .rsp(wb_rsp), .in_s1(wb_s1), .steps(wb_n));
  ta_reader #(.NRD(1), .ADDR0(ADDR_A), .ADDR1(ADDR_A)) u_rr (
    .clk, .rst_n, .enable(run[1] && is_rowo), .choice(choice[1][0]),
    .req(rr_req), .rsp(rr_rsp), .state(rr_st), .cap1(rr_c1), .cap2(rr_c2), .steps(rr_n));
  ta_reader #(.NRD(2), .ADDR0(ADDR_A), .ADDR1(ADDR_B)) u_p2 (
    .clk, .rst_n, .enable(run[1] && is_wa), .choice(choice[1][0]),
    .req(p2_req), .rsp(p2_rsp), .state(p2_st), .cap1(p2_c1), .cap2(p2_c2), .steps(p2_n));
  ta_reader #(.NRD(2), .ADDR0(ADDR_B), .ADDR1(ADDR_A)) u_p3 (
    .clk, .rst_n, .enable(run[2] && is_wa), .choice(choice[2][0]),
    .req(p3_req), .rsp(p3_rsp), .state(p3_st), .cap1(p3_c1), .cap2(p3_c2), .steps(p3_n));
  ta_po_proc #(.WADDR(ADDR_A), .RADDR(ADDR_B)) u_po1 (
    .clk, .rst_n, .enable(run[0] && is_po), .choice(choice[0]),
    .req(po1_req), .rsp(po1_rsp), .state(po1_st), .sample(po1_y), .j(po1_j), .steps(po1_n));
  ta_po_proc #(.WADDR(ADDR_B), .RADDR(ADDR_A)) u_po2 (
    .clk, .rst_n, .enable(run[1] && is_po), .choice(choice[1]),
    .req(po2_req), .rsp(po2_rsp), .state(po2_st), .sample(po2_x), .j(po2_i), .steps(po2_n));

  // ---------------------------------------------------------------- port mux
  always_comb begin
    for (int p = 0; p < 4; p++) req[p] = '0;
    wa_rsp = NO_RSP; wb_rsp = NO_RSP; rr_rsp = NO_RSP; p2_rsp = NO_RSP;
    p3_rsp = NO_RSP; po1_rsp = NO_RSP; po2_rsp = NO_RSP;
    unique case (mode)
      MODE_ROWO: begin
        req[0] = wa_req;  wa_rsp = rsp[0];
        req[1] = rr_req;  rr_rsp = rsp[1];
      end
      MODE_WA: begin
        req[0] = wa_req;  wa_rsp = rsp[0];
        req[1] = p2_req;  p2_rsp = rsp[1];
        req[2] = p3_req;  p3_rsp = rsp[2];
        req[3] = wb_req;  wb_rsp = rsp[3];
      end
      MODE_PO: begin
        req[0] = po1_req; po1_rsp = rsp[0];
        req[1] = po2_req; po2_rsp = rsp[1];
      end
      default: ;
    endcase
  end

  always_comb begin
    steps[0] = (mode == MODE_PO) ? po1_n : wa_n;
    steps[1] = (mode == MODE_PO) ? po2_n : (mode == MODE_WA) ? p2_n : rr_n;
    steps[2] = p3_n;
    steps[3] = wb_n;
  end

  // ---------------------------------------------------------------- properties
  logic ante_mono, ok_mono, ante_atom, ok_atom, ante_po, ok_po;
  data_t u, v, x, y;
  always_comb begin
    ante_mono = 1'b0;
    ok_mono   = 1'b1;
    if (mode == MODE_ROWO && rr_st == 2'd2) begin
      ante_mono = 1'b1;
      ok_mono   = rr_c2[0] >= rr_c1[0];
    end
    if (mode == MODE_WA) begin
      if (p2_st == 2'd2) begin
        ante_mono = 1'b1;
        ok_mono   &= (p2_c1[0] <= p2_c2[0]) && (p2_c1[1] <= p2_c2[1]);
      end
      if (p3_st == 2'd2) begin
        ante_mono = 1'b1;
        ok_mono   &= (p3_c1[0] <= p3_c2[0]) && (p3_c1[1] <= p3_c2[1]);
      end
    end
    u = p2_c1[0];
    v = p2_c1[1];
    x = p3_c1[0];
    y = p3_c1[1];
    ante_atom = (mode == MODE_WA) && (p2_st != 2'd0) && (p3_st != 2'd0);
    ok_atom   = (v >= x) || (y >= u);
    ante_po   = (mode == MODE_PO) && (po1_st == 2'd3) && (po2_st == 2'd3);
    ok_po     = ((po2_x >= data_t'(po1_j)) || (po1_y >= data_t'(po2_i)))
             && ((po2_x <= data_t'(po1_j)) || (po1_y <= data_t'(po2_i)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_monotonic  <= 1'b0;
      hit_atomic     <= 1'b0;
      hit_po_cross   <= 1'b0;
      viol_monotonic <= 1'b0;
      viol_atomic    <= 1'b0;
      viol_po_cross  <= 1'b0;
    end else begin
      if (ante_mono) hit_monotonic <= 1'b1;
      if (ante_atom) hit_atomic    <= 1'b1;
      if (ante_po)   hit_po_cross  <= 1'b1;
      if (ante_mono && !ok_mono) viol_monotonic <= 1'b1;
      if (ante_atom && !ok_atom) viol_atomic    <= 1'b1;
      if (ante_po   && !ok_po)   viol_po_cross  <= 1'b1;
    end
  end

  logic unused;
  assign unused = ^{wa_s1, wb_s1, rr_c1[1], rr_c2[1]};
endmodule
