// ta_po_proc: one processor of the Test_PO test automata, for the program-order rule.
//
// Each step is a write of 0 or 1 to WADDR followed in program order by a read of RADDR.
// Four states: s0 (still writing 0, no sample), s1 (sample taken while writing 0),
// s2 (writing 1, no sample), s3 (sample taken, writing 1). The transitions, chosen by the
// 2-bit choice sampled when a step starts:
//   s0: 0 stay (write 0)   1 -> s1 (write 0, sample := read, j := 0)
//       2 -> s2 (write 1)  3 -> s3 (write 1, sample := read, j := 1)
//   s1: choice[0] = 0 stay (write 0), 1 -> s3 (write 1)
//   s2: choice[0] = 0 stay (write 1), 1 -> s3 (write 1, sample := read, j := 1)
//   s3: stay (write 1)
// sample is the value read at the guessed position, j tells whether the automaton's own
// write of 1 preceded that read. The PO_CROSS property pairs the sample and j of two such
// automata once both are in s3. Each access is blocking; a step ends with the read's done.
module ta_po_proc
  import tmc_pkg::*;
#(
  parameter addr_t WADDR = ADDR_A,
  parameter addr_t RADDR = ADDR_B
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [1:0] choice,
  output mem_req_t   req,
  input  mem_rsp_t   rsp,
  output logic [1:0] state,
  output data_t      sample,
  output logic       j,
  output logic [15:0] steps
);
  logic       busy, rd_phase, wval, take;
  logic [1:0] nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      rd_phase <= 1'b0;
      wval     <= 1'b0;
      take     <= 1'b0;
      nxt      <= 2'd0;
      state    <= 2'd0;
      sample   <= '0;
      j        <= 1'b0;
      steps    <= '0;
    end else if (!busy) begin
      if (enable) begin
        busy     <= 1'b1;
        rd_phase <= 1'b0;
        unique case (state)
          2'd0: begin
            nxt  <= choice;
            wval <= choice[1];
            take <= choice[0];
          end
          2'd1: begin
            nxt  <= choice[0] ? 2'd3 : 2'd1;
            wval <= choice[0];
            take <= 1'b0;
          end
          2'd2: begin
            nxt  <= choice[0] ? 2'd3 : 2'd2;
            wval <= 1'b1;
            take <= choice[0];
          end
          default: begin
            nxt  <= 2'd3;
            wval <= 1'b1;
            take <= 1'b0;
          end
        endcase
      end
    end else if (rsp.done) begin
      if (!rd_phase) begin
        rd_phase <= 1'b1;
      end else begin
        busy  <= 1'b0;
        state <= nxt;
        steps <= steps + 1'b1;
        if (take) begin
          sample <= rsp.rdata;
          j      <= wval;
        end
      end
    end
  end

  assign req = '{valid: busy, we: !rd_phase, addr: rd_phase ? RADDR : WADDR,
                 wdata: data_t'(wval)};
endmodule
