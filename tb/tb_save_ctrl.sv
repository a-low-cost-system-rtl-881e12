// tb_save_ctrl: drives save_clk rising edges with random spacing, random data and a random
// save enable into a free-running controller (TRIGGERED = 0) and a triggered one
// (TRIGGERED = 1), both 5 words deep. It predicts every write (address, data, in the cycle after
// the save_clk edge is sampled), n_saved and the moment is_full rises, and checks that nothing is written
// once full.
`timescale 1ns/1ps
module tb_save_ctrl;
  localparam int unsigned DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic save_clk = 1'b0, save = 1'b0;
  logic [31:0] din = '0;
  logic        we_p, we_t, full_p, full_t;
  logic [2:0]  wa_p, wa_t, ns_p, ns_t;
  logic [31:0] wd_p, wd_t;
  int checks = 0, failures = 0;
  logic [31:0] exp_p[$], exp_t[$];     // expected data, in write order
  int np = 0, nt = 0;         // writes seen
  int skipped = 0;

  always #5 clk = ~clk;

  save_ctrl #(.DEPTH(DEPTH), .DW(32), .TRIGGERED(1'b0)) dut_p (
    .clk, .rst_n, .save_clk, .save, .din, .we(we_p), .waddr(wa_p), .wdata(wd_p), .n_saved(ns_p), .is_full(full_p));
  save_ctrl #(.DEPTH(DEPTH), .DW(32), .TRIGGERED(1'b1)) dut_t (
    .clk, .rst_n, .save_clk, .save, .din, .we(we_t), .waddr(wa_t), .wdata(wd_t), .n_saved(ns_t), .is_full(full_t));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (we_p) begin
      if (np >= DEPTH) begin checks++; failures++; $display("FAIL write when full (P)"); end
      else begin
        check("P addr", wa_p, np);
        check("P data", wd_p, exp_p[np]);
      end
      np++;
    end
    if (we_t) begin
      if (nt >= DEPTH) begin checks++; failures++; $display("FAIL write when full (T)"); end
      else begin
        check("T addr", wa_t, nt);
        check("T data", wd_t, exp_t[nt]);
      end
      nt++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      logic s;
      logic [31:0] d;
      repeat (2 + $urandom_range(0, 5)) @(negedge clk);
      s = (i < 2) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
      if (i == 2) s = 1'b0;
      d = $urandom;
      // Edge at this negedge; the controller samples save and din on the next posedge.
      save_clk = 1'b1; save = s; din = d;
      if (exp_p.size() < DEPTH) exp_p.push_back(d);
      if (s && exp_t.size() < DEPTH) exp_t.push_back(d);
      if (!s) skipped++;
      // Timing: the write strobe follows the first posedge after the edge.
      check("P no write yet", we_p, 0);
      @(posedge clk); #1;
      check("P write timing", we_p, (exp_p.size() <= DEPTH && np < DEPTH) ? 1 : 0);
      check("P n_saved", ns_p, exp_p.size());
      check("T n_saved", ns_t, exp_t.size());
      check("P is_full", full_p, exp_p.size() == DEPTH);
      check("T is_full", full_t, exp_t.size() == DEPTH);
      @(negedge clk) save_clk = $urandom_range(0, 1) == 0;   // stays high sometimes: one edge only
      din = $urandom;
      repeat (2) @(negedge clk);
      save_clk = 1'b0;
    end
    repeat (4) @(negedge clk);
    check("P writes", np, DEPTH);
    check("T writes", nt, exp_t.size());
    checks++;
    if (skipped == 0) begin failures++; $display("FAIL save=0 never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
