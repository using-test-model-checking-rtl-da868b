// ta_writer: the writer test automaton (P1 of Test_ROWO, P1 and P4 of Test_WA).
//
// Two states. In s0 the automaton writes 0 to its location over and over; at a moment it
// guesses, it writes 1 and moves to s1, where it keeps writing 1. This stands for the
// ARCHTEST writer "A := 1; A := 2; ...; A := k" seen through one threshold alpha: every
// value up to alpha reads as 0, every later one as 1, and the nondeterministic moment of
// the switch covers every alpha.
//
// The guess is the input choice, sampled when a step starts (choice = 1 in s0 means this
// step writes 1 and moves to s1). Each step is one blocking write on the memory port;
// the next step starts the cycle after done. New steps start only while enable is high.
module ta_writer
  import tmc_pkg::*;
#(
  parameter addr_t ADDR = ADDR_A
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  input  logic     choice,
  output mem_req_t req,
  input  mem_rsp_t rsp,
  output logic     in_s1,
  output logic [15:0] steps
);
  logic busy, val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      val   <= 1'b0;
      in_s1 <= 1'b0;
      steps <= '0;
    end else if (!busy) begin
      if (enable) begin
        busy <= 1'b1;
        val  <= in_s1 || choice;
      end
    end else if (rsp.done) begin
      busy  <= 1'b0;
      if (val) in_s1 <= 1'b1;
      steps <= steps + 1'b1;
    end
  end

  assign req = '{valid: busy, we: 1'b1, addr: ADDR, wdata: data_t'(val)};
endmodule
