// tb_sem_periodic_lt: periodic long-term meter with a short save period (SLOW_DIV = 40) and an
// 8-word RAM. The input pulses are driven in step with the clock so that every stored word can
// be predicted exactly: a word saved at the CLK SLOW rise seen after clock edge m holds the
// number of input rises first sampled at clock edge m-2 or earlier. The testbench checks the
// CLK SLOW rate (first rise after DIV - DIV/2 cycles, then every DIV cycles), the moment each
// word is counted in n_saved (one cycle after the CLK SLOW rise), ISFULL after the eighth
// save and no saving after it, every RAM word read back, and the live count at the end.
`timescale 1ns/1ps
module tb_sem_periodic_lt;
  localparam int unsigned DIV = 40, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, f_in = 1'b0;
  logic [2:0]  rd_addr = '0;
  logic [31:0] rd_data, count;
  logic        clk_slow, is_full;
  logic [3:0]  n_saved;
  int checks = 0, failures = 0;
  int cyc = 0;
  int rise_n[$], slow_m[$];
  logic slow_prev = 1'b0;
  int full_cyc = -1;

  always #250 clk = ~clk;    // 2 MHz

  sem_periodic_lt #(.CNT_W(32), .DEPTH(DEPTH), .SLOW_DIV(DIV)) dut (
    .clk_sys(clk), .rst_n, .f_in, .rd_addr, .rd_data, .count, .clk_slow, .n_saved, .is_full);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int expected_word(int k);
    int e = 0;
    foreach (rise_n[i]) if (rise_n[i] <= slow_m[k] - 2) e++;
    return e;
  endfunction

  always @(posedge clk) if (rst_n) cyc++;

  always @(negedge clk) if (rst_n) begin
    if (clk_slow && !slow_prev) slow_m.push_back(cyc);
    slow_prev = clk_slow;
    if (is_full && full_cyc < 0) full_cyc = cyc;
    // n_saved counts each CLK SLOW rise one cycle after it (until full).
    if (slow_m.size() > 0 && cyc == slow_m[$] + 1)
      check($sformatf("n_saved after save %0d", slow_m.size()), n_saved,
            slow_m.size() > DEPTH ? DEPTH : slow_m.size());
  end

  // Input: random pulse train, driven on negedges.
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
    #(500 * 2000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (slow_m.size() == DEPTH + 2);
    @(negedge clk);
    check("first CLK SLOW rise", slow_m[0], DIV - DIV/2);
    for (int k = 1; k < slow_m.size(); k++) check("CLK SLOW period", slow_m[k] - slow_m[k-1], DIV);
    check("ISFULL timing", full_cyc, slow_m[DEPTH-1] + 1);
    check("no saves after ISFULL", n_saved, DEPTH);
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk) rd_addr = 3'(k);
      @(posedge clk); #1;
      check($sformatf("word %0d", k), rd_data, expected_word(k));
    end
    // Live count: after clock edge c it holds the rises first sampled at edge c-2 or earlier.
    for (int i = 0; i < 20; i++) begin
      int e;
      e = 0;
      @(negedge clk);
      foreach (rise_n[j]) if (rise_n[j] <= cyc - 2) e++;
      check($sformatf("live count at cycle %0d (last rise %0d)", cyc, rise_n[$]), count, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
