// tb_freq_div: checks the CLK SLOW divider at two small divide ratios (even and odd).
// For each it measures, in clk cycles, the delay from reset to the first rising edge, the
// period between rising edges and the high time, against DIV - DIV/2, DIV and DIV/2.
`timescale 1ns/1ps
module tb_freq_div;
  logic clk = 1'b0, rst_n = 1'b0;
  logic slow_a, slow_b;
  int   checks = 0, failures = 0;

  localparam int unsigned DA = 10, DB = 7;

  always #5 clk = ~clk;

  freq_div #(.DIV(DA)) dut_a (.clk, .rst_n, .clk_slow(slow_a));
  freq_div #(.DIV(DB)) dut_b (.clk, .rst_n, .clk_slow(slow_b));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Cycle numbers (posedges after reset release) of rising and falling edges.
  int cyc = 0;
  int rise_a[$], fall_a[$], rise_b[$], fall_b[$];
  logic pa = 1'b0, pb = 1'b0;
  always @(negedge clk) if (rst_n) begin
    if (slow_a && !pa) rise_a.push_back(cyc);
    if (!slow_a && pa) fall_a.push_back(cyc);
    if (slow_b && !pb) rise_b.push_back(cyc);
    if (!slow_b && pb) fall_b.push_back(cyc);
    pa = slow_a; pb = slow_b;
  end
  always @(posedge clk) if (rst_n) cyc++;

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (50) @(posedge clk);
    @(negedge clk);
    check("A first rise", rise_a[0], DA - DA/2);
    check("B first rise", rise_b[0], DB - DB/2);
    for (int i = 1; i < 4; i++) begin
      check("A period", rise_a[i] - rise_a[i-1], DA);
      check("B period", rise_b[i] - rise_b[i-1], DB);
      check("A high time", fall_a[i-1] - rise_a[i-1], DA/2);
      check("B high time", fall_b[i-1] - rise_b[i-1], DB/2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
