// tb_pulse_counter: drives pulse trains with random high and low times (including one-cycle
// pulses after synchronisation) into a synchronised counter and an unsynchronised one, and
// compares their counts with the number of rising edges the testbench produced. Also checks
// the latency (an edge reaches count SYNC_STAGES + 1 cycles after it is sampled), that an input
// already high at reset is not counted, and wrap-around of a narrow counter.
`timescale 1ns/1ps
module tb_pulse_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sig_a = 1'b1, sig_b = 1'b0;
  logic [31:0] cnt_a;
  logic [3:0]  cnt_b;
  logic        e_a, e_b;
  int checks = 0, failures = 0;
  int edges_a = 0, edges_b = 0;

  always #5 clk = ~clk;

  pulse_counter #(.W(32), .SYNC_STAGES(2)) dut_a (.clk, .rst_n, .sig_in(sig_a), .count(cnt_a), .edge_seen(e_a));
  pulse_counter #(.W(4),  .SYNC_STAGES(0)) dut_b (.clk, .rst_n, .sig_in(sig_b), .count(cnt_b), .edge_seen(e_b));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;      // sig_a is high at reset: must not count
    repeat (5) @(posedge clk);
    #1;
    check("no count for high-at-reset input", cnt_a, 0);

    // Latency: drive one rising edge just after a posedge; count must move 3 cycles later.
    @(negedge clk) sig_a = 1'b0;
    repeat (4) @(negedge clk);
    sig_a = 1'b1; edges_a++;
    @(posedge clk); #1 check("latency: not yet after 1", cnt_a, 0);
    @(posedge clk); #1 check("latency: not yet after 2", cnt_a, 0);
    @(posedge clk); #1 check("latency: counted after 3", cnt_a, 1);

    // Random trains on both inputs.
    for (int i = 0; i < 300; i++) begin
      int hi, lo;
      hi = 1 + int'($urandom_range(0, 4));
      lo = 1 + int'($urandom_range(0, 4));
      @(negedge clk) sig_a = 1'b0; sig_b = 1'b0;
      repeat (lo) @(negedge clk);
      sig_a = 1'b1; sig_b = 1'b1; edges_a++; edges_b++;
      repeat (hi - 1) @(negedge clk);
      if (i % 50 == 0) begin
        repeat (4) @(negedge clk);
        check("running count A", cnt_a, edges_a);
        check("running count B (mod 16)", cnt_b, edges_b % 16);
      end
    end
    @(negedge clk) sig_a = 1'b0; sig_b = 1'b0;
    repeat (6) @(negedge clk);
    check("final count A", cnt_a, edges_a);
    check("final count B (mod 16)", cnt_b, edges_b % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
