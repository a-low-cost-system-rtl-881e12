// tb_period_counter: drives input periods of known length (in clk cycles, from 2 to 2000,
// with random duty) and checks that every valid pulse carries exactly the period that just
// ended, that the first (partial) period is not reported, that one report comes per period,
// and that a narrow counter saturates instead of wrapping.
`timescale 1ns/1ps
module tb_period_counter;
  logic clk = 1'b0, rst_n = 1'b0, sig = 1'b0;
  logic [31:0] period;
  logic [7:0]  period_n;
  logic        valid, valid_n;
  int checks = 0, failures = 0;
  int exp_q[$], exp_n[$];
  int reports = 0;

  always #5 clk = ~clk;

  period_counter #(.W(32), .SYNC_STAGES(2)) dut (.clk, .rst_n, .sig_in(sig), .period, .valid);
  period_counter #(.W(8),  .SYNC_STAGES(2)) dut_n (.clk, .rst_n, .sig_in(sig), .period(period_n), .valid(valid_n));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (valid) begin
      reports++;
      if (exp_q.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected report %0d", period);
      end else check("period", period, exp_q.pop_front());
    end
    if (valid_n) begin
      if (exp_n.size() != 0) check("saturating period", period_n, exp_n.pop_front());
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (7) @(negedge clk);
    // First edge: starts the first measured period, nothing reported.
    sig = 1'b1;
    for (int i = 0; i < 120; i++) begin
      int h;
      p = (i < 5) ? 2 + i : (i % 10 == 0 ? 2000 : 2 + int'($urandom_range(0, 300)));
      h = 1 + int'($urandom_range(0, p - 2));
      repeat (h) @(negedge clk);
      sig = 1'b0;
      repeat (p - h) @(negedge clk);
      exp_q.push_back(p);
      exp_n.push_back(p > 255 ? 255 : p);
      sig = 1'b1;
    end
    repeat (10) @(negedge clk);
    check("one report per period", reports, 120);
    check("all reports arrived", exp_q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
