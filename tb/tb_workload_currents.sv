// tb_workload_currents: the periodic long-term meter at its full default configuration
// (2 MHz CLK SYS, 2.44 Hz CLK SLOW, 32-bit counter, 8192-word RAM) measuring a sequence of
// supply currents, one per circuit state: the meter alone, a processor running and in reset,
// a 32-bit multiplier active and in its two standby modes, a 256-point FFT, an 802.15.4
// physical layer and an AES core, active and with clock enable (11.7 mA to 170.6 mA, the
// highest giving about 208 kHz, just above the nominal 200 kHz range).
//
// The current changes right after a CLK SLOW rise; the next full CLK SLOW interval is then
// measured only at that current. The testbench reads the two words around that interval back
// from the RAM, turns their difference into a frequency and then a current with the converter
// law, and requires it within 0.2 % of the current applied to the converter model: the
// counting method itself adds at most one pulse in several thousand. It also checks that the
// live count matches the model at the end and that the words keep increasing.
`timescale 1ns/1ps
module tb_workload_currents;
  localparam real T_SYS = 500.0;
  localparam int  N = 12;
  localparam real I_MA [N] = '{11.54, 32.61, 17.49, 58.50, 14.11, 11.71,
                               170.57, 12.92, 20.73, 12.55, 113.9, 12.81};

  logic clk = 1'b0, rst_n = 1'b0, f_in, enable = 1'b0;
  real  i_ma = I_MA[0];
  longint pulses;
  logic [12:0] rd_addr = '0;
  logic [31:0] rd_data, count;
  logic        clk_slow, is_full;
  logic [13:0] n_saved;
  int checks = 0, failures = 0;

  always #(T_SYS / 2) clk = ~clk;

  itof_model u_ext (.i_ma, .enable, .f_out(f_in), .pulses);

  sem_periodic_lt dut (.clk_sys(clk), .rst_n, .f_in, .rd_addr, .rd_data, .count, .clk_slow,
                       .n_saved, .is_full);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real ma_from_freq(real f_hz);
    return 1.0e3 * 1500.0 * 100.0e-12 * 2.048 / (0.5 * (1.0 / f_hz - 1.2e-6));
  endfunction

  task automatic read_word(input int a, output logic [31:0] w);
    @(negedge clk) rd_addr = 13'(a);
    @(posedge clk); #1 w = rd_data;
  endtask

  initial begin
    #20s;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w0, w1;
    real f, est;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    enable = 1'b1;
    for (int k = 0; k < N; k++) begin
      int first;
      @(posedge clk_slow);
      i_ma = I_MA[k];
      first = int'(n_saved) + 1;            // index of the word stored at the next rise
      @(posedge clk_slow);
      @(posedge clk_slow);
      repeat (4) @(posedge clk);
      read_word(first - 1, w0);
      read_word(first, w1);
      f = real'(w1 - w0) * 2.0e6 / 819672.0;
      est = ma_from_freq(f);
      $display("%7.2f mA: %0d pulses in one CLK SLOW period, %.1f Hz, measured %.3f mA",
               I_MA[k], w1 - w0, f, est);
      check($sformatf("%.2f mA measured as %.3f mA", I_MA[k], est),
            est > 0.998 * I_MA[k] && est < 1.002 * I_MA[k]);
      check("words increase", w1 > w0);
    end
    check("not full", !is_full);
    @(negedge clk);
    check($sformatf("live count %0d vs converter %0d", count, pulses),
          longint'(count) <= pulses && longint'(count) >= pulses - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
