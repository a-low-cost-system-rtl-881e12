// tb_sem_spaced_st: spaced short-term meter on a 20 MHz clock with a 6-pair RAM. The input is
// driven in step with the clock with random periods (4 to 400 cycles) and duty, and SAVE is set
// at random in the middle of each period, so that the testbench knows which periods must be
// stored. For each stored pair it checks the period in cycles, and the time stamp: the clock
// edge count at which the closing rise was first sampled, plus one (the cycle the rise is
// detected). It also checks n_saved three cycles after the closing rise is sampled, that
// periods with SAVE low are skipped, that the first period after reset is not stored, ISFULL,
// and that nothing is stored after it.
`timescale 1ns/1ps
module tb_sem_spaced_st;
  localparam int unsigned DEPTH = 6;
  logic clk = 1'b0, rst_n = 1'b0, f_in = 1'b0, save = 1'b0;
  logic [2:0]  rd_addr = '0;
  logic [31:0] rd_period, rd_ts, period, timestamp;
  logic        is_full;
  logic [2:0]  n_saved;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_per[$], exp_ts[$], exp_n[$];
  int skipped = 0, closed = 0, full_cyc = -1;

  always #25 clk = ~clk;     // 20 MHz

  sem_spaced_st #(.PER_W(32), .TS_W(32), .DEPTH(DEPTH)) dut (
    .clk_fast(clk), .rst_n, .f_in, .save, .rd_addr, .rd_period, .rd_ts, .period, .timestamp,
    .n_saved, .is_full);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n) cyc++;

  always @(negedge clk) if (rst_n) begin
    if (is_full && full_cyc < 0) full_cyc = cyc;
    foreach (exp_n[i]) if (cyc == exp_n[i] + 3) check($sformatf("n_saved after pair %0d", i), n_saved, i + 1);
  end

  initial begin
    #(50 * 200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, h, n;
    logic s;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    save = 1'b1;                       // high from the start: the first, partial period must not be stored
    repeat (5) @(negedge clk);
    f_in = 1'b1;                       // opening rise
    for (int i = 1; i <= 30; i++) begin
      p = 4 + int'($urandom_range(0, 396));
      h = 1 + int'($urandom_range(0, p - 2));
      s = (i == 2) ? 1'b0 : 1'($urandom_range(0, 2) != 0);
      for (int c = 1; c <= p; c++) begin
        @(negedge clk);
        if (c == h) f_in = 1'b0;
        if (c == p / 2) save = s;
      end
      f_in = 1'b1;                     // closing rise of period i, sampled at the next edge
      n = cyc + 1;
      closed++;
      if (s && exp_per.size() < DEPTH) begin
        exp_per.push_back(p); exp_ts.push_back(n + 1); exp_n.push_back(n);
      end
      if (!s) skipped++;
    end
    repeat (10) @(negedge clk);
    check("ISFULL timing", full_cyc, exp_n[DEPTH-1] + 3);
    check("no saves after ISFULL", n_saved, DEPTH);
    checks++;
    if (skipped == 0) begin failures++; $display("FAIL SAVE low never exercised"); end
    for (int j = 0; j < DEPTH; j++) begin
      @(negedge clk) rd_addr = 3'(j);
      @(posedge clk); #1;
      check($sformatf("pair %0d period", j), rd_period, exp_per[j]);
      check($sformatf("pair %0d time stamp", j), rd_ts, exp_ts[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
