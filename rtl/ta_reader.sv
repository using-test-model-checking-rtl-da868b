// ta_reader: the reader test automaton (P2 of Test_ROWO, P2 and P3 of Test_WA).
//
// Each step reads NRD locations in program order: ADDR0, then ADDR1 when NRD = 2. In s0
// the values read are thrown away. At a moment the automaton guesses (choice = 1 when a
// step starts), the step's values are kept as the first sample (cap1) and the automaton
// moves to s1; at a second guessed moment the next step's values become the second
// sample (cap2) and it moves to s2, where it keeps reading. The two samples are two
// successive elements X_i, X_i+1 of the ARCHTEST result array for a guessed i.
//
// Test_ROWO uses one location and checks cap2 >= cap1 in s2 (MONOTONIC); Test_WA uses
// the first sample of two readers for ATOMIC and both samples for MONOTONIC. Each read
// is one blocking access; a step ends with the done of its last read.
module ta_reader
  import tmc_pkg::*;
#(
  parameter int unsigned NRD   = 1,
  parameter addr_t       ADDR0 = ADDR_A,
  parameter addr_t       ADDR1 = ADDR_B
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  input  logic     choice,
  output mem_req_t req,
  input  mem_rsp_t rsp,
  output logic [1:0] state,          // 0 = s0, 1 = s1, 2 = s2
  output data_t    cap1 [2],
  output data_t    cap2 [2],
  output logic [15:0] steps
);
  logic  busy, idx, take;
  data_t got0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx   <= 1'b0;
      take  <= 1'b0;
      got0  <= '0;
      state <= 2'd0;
      steps <= '0;
      for (int k = 0; k < 2; k++) begin
        cap1[k] <= '0;
        cap2[k] <= '0;
      end
    end else if (!busy) begin
      if (enable) begin
        busy <= 1'b1;
        idx  <= 1'b0;
        take <= (state != 2'd2) && choice;
      end
    end else if (rsp.done) begin
      if (!idx && NRD == 2) begin
        got0 <= rsp.rdata;
        idx  <= 1'b1;
      end else begin
        busy  <= 1'b0;
        steps <= steps + 1'b1;
        if (take) begin
          state <= state + 2'd1;
          if (state == 2'd0) begin
            cap1[0] <= (NRD == 2) ? got0 : rsp.rdata;
            cap1[1] <= rsp.rdata;
          end else begin
            cap2[0] <= (NRD == 2) ? got0 : rsp.rdata;
            cap2[1] <= rsp.rdata;
          end
        end
      end
    end
  end

  assign req = '{valid: busy, we: 1'b0, addr: idx ? ADDR1 : ADDR0, wdata: '0};
endmodule
