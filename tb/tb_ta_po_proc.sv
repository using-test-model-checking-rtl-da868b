// tb_ta_po_proc: self-checking test of the Test_PO processor automaton (writes A, reads B).
//
// A testbench memory answers after 0..2 wait cycles, reads with random values. A reference
// model holds the transition table of the automaton (from s0: stay, to s1 with sample and
// j = 0, to s2, to s3 with sample and j = 1; s1 and s2 to s3; s3 stays) and predicts,
// from the guess seen when each step starts, the value written, the next state, and the
// sample and j. Checked: each step is a write of A followed by a read of B, the written
// value, state, sample, j and the step count; every state is visited over the run.
`timescale 1ns/1ps
module tb_ta_po_proc;
  import tmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable;
  logic [1:0] choice;
  mem_req_t req;
  mem_rsp_t rsp;
  logic [1:0] state;
  data_t sample;
  logic j;
  logic [15:0] steps;
  ta_po_proc #(.WADDR(ADDR_A), .RADDR(ADDR_B)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int wait_left = 0;
  logic was_valid = 1'b0;
  logic idle_prev = 1'b1, en_prev = 1'b0;
  logic [1:0] ch_prev = '0;
  int nacc = 0, m_steps = 0;
  logic [1:0] m_state = 2'd0, m_nxt = 2'd0;
  logic m_wval = 1'b0, m_take = 1'b0, m_j = 1'b0;
  data_t m_sample = '0;
  int visits [4] = '{0, 0, 0, 0};

  always @(negedge clk) begin
    if (rst_n) begin
      check(state == m_state && sample == m_sample && j == m_j && int'(steps) == m_steps,
            $sformatf("state, sample, j and steps match the reference %0d/%0d %0d/%0d %0d/%0d %0d/%0d t=%0t", state, m_state, sample, m_sample, j, m_j, steps, m_steps, $time));
      if (req.valid && idle_prev) begin
        nacc = 0;
        unique case (m_state)
          2'd0: begin m_nxt = ch_prev; m_wval = ch_prev[1]; m_take = ch_prev[0]; end
          2'd1: begin m_nxt = ch_prev[0] ? 2'd3 : 2'd1; m_wval = ch_prev[0]; m_take = 1'b0; end
          2'd2: begin m_nxt = ch_prev[0] ? 2'd3 : 2'd2; m_wval = 1'b1; m_take = ch_prev[0]; end
          2'd3: begin m_nxt = 2'd3; m_wval = 1'b1; m_take = 1'b0; end
        endcase
      end
    end
    rsp = '0;
    if (req.valid) begin
      if (!was_valid) wait_left = $urandom % 3;
      if (wait_left == 0) begin
        rsp.done  = 1'b1;
        rsp.rdata = data_t'($urandom);
      end else wait_left--;
    end
    if (rst_n && rsp.done) begin
      if (nacc == 0) begin
        check(req.we && req.addr == ADDR_A && req.wdata == data_t'(m_wval), "write of A with predicted value");
      end else begin
        check(!req.we && req.addr == ADDR_B, "then read of B");
        m_steps++;
        if (m_take) begin m_sample = rsp.rdata; m_j = m_wval; end
        m_state = m_nxt;
        visits[m_state]++;
      end
      nacc++;
    end
    was_valid = req.valid && !rsp.done;
    choice    = (($urandom % 5) == 0) ? 2'($urandom) : 2'b00;
    idle_prev = !req.valid || (rsp.done && nacc == 2);
    ch_prev   = choice;
    en_prev   = enable;
  end

  initial begin
    #500_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1'b0;
    for (int run = 0; run < 30; run++) begin
      rst_n = 1'b0;
      m_state = 2'd0; m_sample = '0; m_j = 1'b0; m_steps = 0; nacc = 0;
      was_valid = 1'b0; idle_prev = 1'b1;
      repeat (2) @(posedge clk);
      @(negedge clk);
      #1 rst_n = 1'b1;
      enable = 1'b1;
      repeat (100) @(negedge clk);
      #1 enable = 1'b0;
      repeat (8) @(negedge clk);
      check(!req.valid, "stops when disabled");
    end
    for (int s = 0; s < 4; s++) check(visits[s] > 0, $sformatf("state s%0d visited", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
