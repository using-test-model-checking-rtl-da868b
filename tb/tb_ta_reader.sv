// tb_ta_reader: self-checking test of the reader test automaton (two locations, A then B).
//
// A testbench memory answers each read after 0..2 wait cycles with a random value, and a
// reference model of the automaton, fed with the same guesses and values, predicts the
// state and the two samples. Checked every cycle: the address order A, B within a step,
// reads only, the state, cap1 and cap2, and the step count; also that s2 is reached and
// that with enable low the automaton stops. Twenty episodes, each from reset.
`timescale 1ns/1ps
module tb_ta_reader;
  import tmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable, choice;
  mem_req_t req;
  mem_rsp_t rsp;
  logic [1:0] state;
  data_t cap1 [2], cap2 [2];
  logic [15:0] steps;
  ta_reader #(.NRD(2), .ADDR0(ADDR_A), .ADDR1(ADDR_B)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int wait_left = 0;
  logic was_valid = 1'b0;
  logic idle_prev = 1'b1, ch_prev = 1'b0, en_prev = 1'b0;
  logic take = 1'b0;
  int   nread = 0, m_steps = 0, reached_s2 = 0;
  logic [1:0] m_state = 2'd0;
  data_t v0, m_c1 [2], m_c2 [2];

  always @(negedge clk) begin
    if (rst_n) begin
      check(state == m_state && cap1 == m_c1 && cap2 == m_c2 && int'(steps) == m_steps,
            "state, samples and steps match the reference");
      if (req.valid && idle_prev) begin
        take  = ch_prev && (m_state != 2'd2);
        nread = 0;
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
      check(!req.we, "reads only");
      check(req.addr == ((nread == 0) ? ADDR_A : ADDR_B), "A then B");
      if (nread == 0) v0 = rsp.rdata;
      else begin
        m_steps++;
        if (take) begin
          if (m_state == 2'd0) m_c1 = '{v0, rsp.rdata};
          else                 m_c2 = '{v0, rsp.rdata};
          m_state++;
        end
      end
      nread++;
    end
    if (m_state == 2'd2) reached_s2++;
    was_valid = req.valid && !rsp.done;
    choice    = ($urandom % 6) == 0;
    idle_prev = !req.valid || (rsp.done && nread == 2);
    ch_prev   = choice;
    en_prev   = enable;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Twenty episodes, each from reset, so that the first sample is taken many times.
  int total_steps = 0;
  initial begin
    m_c1 = '{'0, '0}; m_c2 = '{'0, '0};
    enable = 1'b0;
    for (int ep = 0; ep < 20; ep++) begin
      @(negedge clk); #1;
      rst_n = 1'b0;
      m_state = 2'd0; m_c1 = '{'0, '0}; m_c2 = '{'0, '0};
      m_steps = 0; nread = 0; was_valid = 1'b0; idle_prev = 1'b1; ch_prev = 1'b0;
      repeat (2) @(negedge clk);
      #1 rst_n = 1'b1;
      enable = 1'b1;
      repeat (150) @(negedge clk);
      #1 enable = 1'b0;
      repeat (8) @(negedge clk);
      check(!req.valid, "stops when disabled");
      total_steps += m_steps;
    end
    check(reached_s2 > 0, "s2 reached");
    check(total_steps > 500, "steps made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
