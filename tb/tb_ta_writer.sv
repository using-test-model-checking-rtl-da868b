// tb_ta_writer: self-checking test of the writer test automaton.
//
// A testbench memory answers each access after a random delay and logs the writes. The
// guess input is random. Checked: every access is a write to the automaton's location;
// the values written are a run of 0s followed only by 1s; the switch to 1 happens exactly
// in the step that started with choice = 1 (in s0); in_s1 follows the first write of 1;
// steps counts the completed writes; with enable low no new step starts.
`timescale 1ns/1ps
module tb_ta_writer;
  import tmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable, choice, in_s1;
  mem_req_t req;
  mem_rsp_t rsp;
  logic [15:0] steps;
  ta_writer #(.ADDR(ADDR_B)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One negedge process plays the memory (answers after 0..2 wait cycles), draws the
  // guess, and works out the value each step must write from the state and guess seen
  // at the clock edge where the step began.
  int wait_left = 0;
  logic was_valid = 1'b0;
  logic idle_prev = 1'b1, ch_prev = 1'b0, s1_prev = 1'b0, en_prev = 1'b0;
  logic exp_val = 1'b0;
  int nwrites = 0, nones = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (req.valid && idle_prev) exp_val = s1_prev || ch_prev;
      if (req.valid) check(req.wdata == data_t'(exp_val), "value follows state and guess");
    end
    rsp = '0;
    if (req.valid) begin
      if (!was_valid) wait_left = $urandom % 3;
      if (wait_left == 0) rsp.done = 1'b1; else wait_left--;
    end
    if (rst_n && rsp.done) begin
      check(req.we && req.addr == ADDR_B, "write to own location");
      if (req.wdata == 1'b1) nones++;
      else check(nones == 0, "no 0 after a 1");
      nwrites++;
    end
    was_valid = req.valid && !rsp.done;
    choice = ($urandom % 8) == 0;
    idle_prev = !req.valid || rsp.done;
    ch_prev = choice;
    s1_prev = in_s1 || (rsp.done && req.wdata == 1'b1);
    en_prev = enable;
  end

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!req.valid && steps == 0, "idle while disabled");
    #1 enable = 1'b1;
    repeat (400) @(negedge clk);
    #1 enable = 1'b0;
    repeat (5) @(negedge clk);
    check(!req.valid, "stops when disabled");
    check(int'(steps) == nwrites, "steps counts writes");
    check(nwrites > 50, "writes made");
    check(in_s1 == (nones > 0), "in_s1 after first 1");
    check(nones > 0, "switched to 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
