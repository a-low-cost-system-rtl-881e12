// tb_sem_top_full: the self energy meter core at its full default configuration (2.44 Hz
// CLK SLOW from a 2 MHz system clock, 8192-word periodic RAM, 1024-pair spaced RAMs, 20 MHz
// short-term reference), driven by the current-to-frequency converter model while the FPGA
// draws 32.61 mA. It runs 0.65 s of circuit time, which covers two CLK SLOW periods:
//   * periodic LT: the first two words are stored at the expected CLK SLOW rises (409836
//     and 1229508 system cycles after reset), match the converter's pulse count, and their
//     difference times 2.44 Hz gives back the current within 1 %;
//   * spaced LT: SAVE rises between the two CLK SLOW rises, so the second rise is stored with
//     time stamp 1 while the first is skipped;
//   * spaced ST: SAVE is high for 0.2 ms; each stored period matches the converter within one
//     20 MHz cycle.
`timescale 1ns/1ps
module tb_sem_top_full;
  localparam real T_SYS = 500.0, T_FAST = 50.0;
  localparam real I_MA = 32.61;

  logic clk_sys = 1'b0, clk_fast = 1'b0, clk_cpu = 1'b0, rst_n = 1'b0;
  logic f_in, enable = 1'b0;
  real  i_ma = I_MA;
  longint pulses;

  logic [12:0] p_rd_addr = '0;
  logic [31:0] p_rd_data, p_count;
  logic        p_clk_slow, p_is_full;
  logic [13:0] p_n_saved;
  logic        lt_save = 1'b0;
  logic [9:0]  l_rd_addr = '0;
  logic [31:0] l_rd_count, l_rd_ts, l_count, l_timestamp;
  logic        l_clk_slow, l_is_full;
  logic [10:0] l_n_saved;
  logic [15:0] cpu_instr = 16'h4303;
  logic        cpu_instr_valid = 1'b0, st_save = 1'b0, st_use_cpu_trig = 1'b0, cpu_trig;
  logic [9:0]  s_rd_addr = '0;
  logic [31:0] s_rd_period, s_rd_ts, s_period, s_timestamp;
  logic [10:0] s_n_saved;
  logic        s_is_full;

  int checks = 0, failures = 0;
  realtime t_reset;
  realtime slow_t[$];
  longint  slow_pulses[$];

  always #(T_SYS / 2)  clk_sys  = ~clk_sys;
  always #(T_FAST / 2) clk_fast = ~clk_fast;

  itof_model u_ext (.i_ma, .enable, .f_out(f_in), .pulses);

  sem_top dut (.*);

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

  always @(posedge p_clk_slow) begin
    slow_t.push_back($realtime);
    slow_pulses.push_back(pulses);
  end

  initial begin
    #2s;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (rst_n);
    #(0.5s) lt_save = 1'b1;
  end
  initial begin
    wait (rst_n);
    #(0.1ms) st_save = 1'b1;
    #(0.2ms) st_save = 1'b0;
  end

  initial begin
    real f, i_est, exp_cyc;
    repeat (4) @(posedge clk_sys);
    @(negedge clk_sys) rst_n = 1'b1;
    t_reset = $realtime;
    enable = 1'b1;
    #(0.65s);

    check($sformatf("two CLK SLOW rises (%0d)", slow_t.size()), slow_t.size() == 2);
    check("first CLK SLOW rise after 409836 cycles",
          (slow_t[0] - t_reset) / T_SYS > 409835.0 && (slow_t[0] - t_reset) / T_SYS < 409837.0);
    check("CLK SLOW period 819672 cycles",
          (slow_t[1] - slow_t[0]) / T_SYS > 819671.0 && (slow_t[1] - slow_t[0]) / T_SYS < 819673.0);
    check($sformatf("periodic: %0d words", p_n_saved), p_n_saved == 2 && !p_is_full);
    begin
      logic [31:0] w[2];
      for (int k = 0; k < 2; k++) begin
        @(negedge clk_sys) p_rd_addr = 13'(k);
        @(posedge clk_sys); #1 w[k] = p_rd_data;
        check($sformatf("periodic word %0d = %0d, converter %0d", k, w[k], slow_pulses[k]),
              longint'(w[k]) <= slow_pulses[k] && longint'(w[k]) >= slow_pulses[k] - 1);
      end
      f = real'(w[1] - w[0]) * 2.0e6 / 819672.0;
      i_est = ma_from_freq(f);
      check($sformatf("periodic: current %.3f mA vs %.2f", i_est, I_MA),
            i_est > 0.99 * I_MA && i_est < 1.01 * I_MA);
    end

    check($sformatf("spaced LT: %0d pairs", l_n_saved), l_n_saved == 1);
    @(negedge clk_sys) l_rd_addr = '0;
    @(posedge clk_sys); #1;
    check($sformatf("spaced LT time stamp %0d", l_rd_ts), l_rd_ts == 1);
    check($sformatf("spaced LT count %0d, converter %0d", l_rd_count, slow_pulses[1]),
          longint'(l_rd_count) <= slow_pulses[1] && longint'(l_rd_count) >= slow_pulses[1] - 1);

    check($sformatf("spaced ST: %0d pairs", s_n_saved), s_n_saved >= 9 && s_n_saved <= 11);
    exp_cyc = u_ext.period_ns(I_MA) / T_FAST;
    for (int j = 0; j < int'(s_n_saved); j++) begin
      @(negedge clk_fast) s_rd_addr = 10'(j);
      @(posedge clk_fast); #1;
      check($sformatf("spaced ST period %0d cycles vs %.1f", s_rd_period, exp_cyc),
            real'(s_rd_period) >= exp_cyc - 1.0 && real'(s_rd_period) <= exp_cyc + 1.0);
      check($sformatf("spaced ST time stamp %0d in window", s_rd_ts),
            real'(s_rd_ts) * T_FAST >= 0.1e6 && real'(s_rd_ts) * T_FAST <= 0.31e6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
