// tb_tmc_harness: self-checking test of the test automata and memory rule safety
// properties.
//
// The harness drives a behavioural memory (tb_weak_mem) that is either sequentially
// consistent or relaxed (writes reach the other processors after independent random
// delays). For each test mode, many short episodes run with random guesses and random
// pauses. Checked: on the consistent memory no property ever fails and each property's
// antecedent is reached; on the relaxed memory the property of each test (MONOTONIC in
// ROWO, ATOMIC in WA, PO_CROSS in PO) fails in some episode; the ports a mode does not
// use stay idle; and each reported violation agrees with the values the automata hold.
`timescale 1ns/1ps
module tb_tmc_harness;
  import tmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  test_mode_e mode;
  logic [3:0] run;
  logic [1:0] choice [4];
  mem_req_t req [4];
  mem_rsp_t rsp [4];
  logic hit_monotonic, hit_atomic, hit_po_cross;
  logic viol_monotonic, viol_atomic, viol_po_cross;
  logic [15:0] steps [4];
  logic relaxed;

  tmc_harness dut (.*);
  tb_weak_mem #(.MAXDELAY(60)) u_mem (.clk, .rst_n, .relaxed, .req, .rsp);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    for (int p = 0; p < 4; p++) choice[p] = (($urandom % 4) == 0) ? 2'($urandom) : 2'b00;
    if (rst_n) for (int p = 0; p < 4; p++) if (($urandom % 16) == 0) run[p] = ~run[p];
    if (rst_n) begin
      if (mode != MODE_WA) check(!req[2].valid && !req[3].valid, "unused ports idle");
    end
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nviol [2][3];
    int nhit [3];
    for (int w = 0; w < 2; w++) for (int m = 0; m < 3; m++) nviol[w][m] = 0;
    for (int m = 0; m < 3; m++) nhit[m] = 0;
    run = '0;
    for (int w = 0; w < 2; w++) begin
      for (int m = 0; m < 3; m++) begin
        for (int e = 0; e < (w ? 2000 : 300); e++) begin
          relaxed = 1'(w);
          mode = test_mode_e'(m);
          rst_n = 1'b0;
          repeat (2) @(posedge clk);
          @(negedge clk);
          #1 rst_n = 1'b1;
          run = '1;
          repeat (150) @(negedge clk);
          #1;
          unique case (mode)
            MODE_ROWO: begin
              if (viol_monotonic) nviol[w][m]++;
              if (hit_monotonic && !w) nhit[m]++;
              if (viol_monotonic)
                check(dut.rr_c1[0] == 1'b1 && dut.rr_c2[0] == 1'b0, "MONOTONIC report matches samples");
            end
            MODE_WA: begin
              if (viol_atomic) nviol[w][m]++;
              if (hit_atomic && !w) nhit[m]++;
              if (viol_atomic)
                check(dut.u == 1'b1 && dut.v == 1'b0 && dut.x == 1'b1 && dut.y == 1'b0,
                      "ATOMIC report matches u=1 v=0 x=1 y=0");
            end
            default: begin
              if (viol_po_cross) nviol[w][m]++;
              if (hit_po_cross && !w) nhit[m]++;
            end
          endcase
          if (!w) check(!viol_monotonic && !viol_atomic && !viol_po_cross,
                        $sformatf("no violation on the consistent memory (mode %0d)", m));
        end
      end
    end
    for (int m = 0; m < 3; m++) begin
      $display("mode %0d: antecedent reached in %0d, violations consistent=%0d relaxed=%0d",
               m, nhit[m], nviol[0][m], nviol[1][m]);
      check(nhit[m] > 0, $sformatf("antecedent reached, mode %0d", m));
      check(nviol[1][m] > 0, $sformatf("relaxed memory caught, mode %0d", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
