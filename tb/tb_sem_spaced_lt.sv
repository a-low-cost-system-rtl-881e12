// tb_sem_spaced_lt: spaced long-term meter with SLOW_DIV = 40 and a 4-pair RAM. The input is
// driven in step with the clock, as in the periodic test, and SAVE is changed at random halfway
// between CLK SLOW rises. For every CLK SLOW rise the testbench knows whether SAVE was high,
// so it predicts which rises are stored, the pulse count of each (the rises first sampled two
// clock edges or more before the CLK SLOW rise was seen) and its time stamp (the number of
// earlier CLK SLOW rises). It checks n_saved one cycle after each rise, that rises with SAVE low
// are skipped, ISFULL after the fourth pair and nothing after it, and every pair read back.
`timescale 1ns/1ps
module tb_sem_spaced_lt;
  localparam int unsigned DIV = 40, DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, f_in = 1'b0, save = 1'b0;
  logic [1:0]  rd_addr = '0;
  logic [31:0] rd_count, rd_ts, count, timestamp;
  logic        clk_slow, is_full;
  logic [2:0]  n_saved;
  int checks = 0, failures = 0;
  int cyc = 0;
  int rise_n[$], slow_m[$], saved_k[$];
  logic slow_prev = 1'b0;
  int full_cyc = -1, skipped = 0;

  always #250 clk = ~clk;

  sem_spaced_lt #(.CNT_W(32), .TS_W(32), .DEPTH(DEPTH), .SLOW_DIV(DIV)) dut (
    .clk_sys(clk), .rst_n, .f_in, .save, .rd_addr, .rd_count, .rd_ts, .count, .timestamp,
    .clk_slow, .n_saved, .is_full);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int expected_count(int m);
    int e = 0;
    foreach (rise_n[i]) if (rise_n[i] <= m - 2) e++;
    return e;
  endfunction

  always @(posedge clk) if (rst_n) cyc++;

  always @(negedge clk) if (rst_n) begin
    if (clk_slow && !slow_prev) begin
      slow_m.push_back(cyc);
      if (save && saved_k.size() < DEPTH) saved_k.push_back(slow_m.size() - 1);
      if (!save) skipped++;
    end
    slow_prev = clk_slow;
    if (is_full && full_cyc < 0) full_cyc = cyc;
    if (slow_m.size() > 0 && cyc == slow_m[$] + 1)
      check($sformatf("n_saved after CLK SLOW rise %0d", slow_m.size()), n_saved, saved_k.size());
    // SAVE changes halfway between CLK SLOW rises; the first two rises are skipped, the third saved.
    if (slow_m.size() > 0 && cyc == slow_m[$] + DIV/2)
      save = (slow_m.size() < 2) ? 1'b0 : (slow_m.size() == 2) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
  end

  initial begin
    wait (rst_n);
    forever begin
      repeat (1 + $urandom_range(0, 3)) @(negedge clk);
      f_in = 1'b1; rise_n.push_back(cyc + 1);
      repeat (1 + $urandom_range(0, 2)) @(negedge clk);
      f_in = 1'b0;
    end
  end

  initial begin
    #(500 * 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (saved_k.size() == DEPTH);
    repeat (3 * DIV) @(negedge clk);
    check("ISFULL timing", full_cyc, slow_m[saved_k[DEPTH-1]] + 1);
    check("no saves after ISFULL", n_saved, DEPTH);
    checks++;
    if (skipped == 0) begin failures++; $display("FAIL SAVE low never exercised"); end
    for (int j = 0; j < DEPTH; j++) begin
      @(negedge clk) rd_addr = 2'(j);
      @(posedge clk); #1;
      check($sformatf("pair %0d count", j), rd_count, expected_count(slow_m[saved_k[j]]));
      check($sformatf("pair %0d time stamp", j), rd_ts, saved_k[j]);
    end
    @(negedge clk);
    check("live time stamp", timestamp, slow_m.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
