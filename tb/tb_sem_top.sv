// tb_sem_top: end-to-end test of the self energy meter core with the external
// current-to-frequency converter modelled (itof_model), at reduced sizes: CLK SLOW every 1 ms
// (SLOW_DIV = 2000 at 2 MHz), 6 periodic words, 3 spaced long-term pairs, 8 short-term pairs.
//
// Scenario (times after reset): the FPGA draws 11.54 mA until 2 ms, then 58.5 mA.
//   * periodic LT: every word is checked against the converter's own pulse count at the CLK
//     SLOW rise (it may miss the pulse that was still in the synchroniser), and the mean
//     current recomputed from the words, as the measurement software would, must be within
//     10 % (1 ms windows at 18 kHz) and 1.5 % (3 ms at 85 kHz) of the true current. ISFULL
//     must rise after the sixth word.
//   * spaced LT: lt_save is high from 1 to 2 ms and from 3 ms on, so CLK SLOW rises 1, 3 and 4
//     are stored (time stamps 1, 3, 4), rises 0 and 2 are skipped, ISFULL follows the third.
//   * spaced ST: st_save is high from 0.6 to 0.8 ms; then the trigger is switched to the
//     CALL/RET detector and a processor routine (with a nested call) runs from 3.2 to 3.3 ms.
//     Every stored period must match the converter's period within one 20 MHz cycle, which
//     keeps the current error under 1 %, and every time stamp must lie in its trigger window.
// Each mechanism (save, skip, ISFULL on every version, both trigger sources, nesting) is
// counted and must occur.
`timescale 1ns/1ps
module tb_sem_top;
  localparam int unsigned SLOW_DIV = 2000, P_DEPTH = 6, L_DEPTH = 3, S_DEPTH = 8;
  localparam real T_SYS = 500.0, T_FAST = 50.0, T_CPU = 100.0;
  localparam real I_A = 11.54, I_B = 58.5;   // mA

  logic clk_sys = 1'b0, clk_fast = 1'b0, clk_cpu = 1'b0, rst_n = 1'b0;
  logic f_in, enable = 1'b0;
  real  i_ma = I_A;
  longint pulses;

  logic [2:0]  p_rd_addr = '0;
  logic [31:0] p_rd_data, p_count;
  logic        p_clk_slow, p_is_full;
  logic [2:0]  p_n_saved;
  logic        lt_save = 1'b0;
  logic [1:0]  l_rd_addr = '0;
  logic [31:0] l_rd_count, l_rd_ts, l_count, l_timestamp;
  logic        l_clk_slow, l_is_full;
  logic [1:0]  l_n_saved;
  logic [15:0] cpu_instr = 16'h4303;
  logic        cpu_instr_valid = 1'b0, st_save = 1'b0, st_use_cpu_trig = 1'b0, cpu_trig;
  logic [2:0]  s_rd_addr = '0;
  logic [31:0] s_rd_period, s_rd_ts, s_period, s_timestamp;
  logic [3:0]  s_n_saved;
  logic        s_is_full;

  int checks = 0, failures = 0;
  realtime t_reset;
  realtime slow_t[$];
  longint  slow_pulses[$];
  int n_periodic_save = 0, n_lt_save = 0, n_lt_skip = 0, n_st_ext = 0, n_st_cpu = 0;
  int n_nest = 0;

  always #(T_SYS / 2)  clk_sys  = ~clk_sys;
  always #(T_FAST / 2) clk_fast = ~clk_fast;
  always #(T_CPU / 2)  clk_cpu  = ~clk_cpu;

  itof_model u_ext (.i_ma, .enable, .f_out(f_in), .pulses);

  sem_top #(.SLOW_DIV(SLOW_DIV), .P_DEPTH(P_DEPTH), .L_DEPTH(L_DEPTH), .S_DEPTH(S_DEPTH)) dut (.*);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real ma_from_freq(real f_hz);
    // Inverse of the converter law f = 1 / (Rg*C*Vref / (Rs*I) + td).
    return 1.0e3 * 1500.0 * 100.0e-12 * 2.048 / (0.5 * (1.0 / f_hz - 1.2e-6));
  endfunction

  function automatic real ms(realtime t);
    return (t - t_reset) / 1.0e6;
  endfunction

  // Converter pulse count at every CLK SLOW rise.
  always @(posedge p_clk_slow) begin
    slow_t.push_back($realtime);
    slow_pulses.push_back(pulses);
  end


  initial begin
    #12ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Current profile and the two long-term SAVE windows.
  initial begin
    wait (rst_n);
    #(2ms)  i_ma = I_B;
  end
  initial begin
    wait (rst_n);
    #(1ms)  lt_save = 1'b1;
    #(1ms)  lt_save = 1'b0;
    #(1ms)  lt_save = 1'b1;
  end
  initial begin
    wait (rst_n);
    #(0.6ms) st_save = 1'b1;
    #(0.2ms) st_save = 1'b0;
  end

  // Processor instruction stream: a routine from 3.2 ms to 3.3 ms with one nested call.
  task automatic fetch(input logic [15:0] w);
    @(negedge clk_cpu);
    cpu_instr = w; cpu_instr_valid = 1'b1;
    @(negedge clk_cpu);
    cpu_instr_valid = 1'b0;
  endtask
  initial begin
    wait (rst_n);
    #(3.0ms) st_use_cpu_trig = 1'b1;
    #(0.2ms) fetch(16'h12B0);                 // CALL #routine
    repeat (100) fetch(16'h5405);             // ADD R4,R5
    fetch(16'h1285);                          // CALL R5
    if (cpu_trig) n_nest++;
    repeat (200) fetch(16'h4303);
    fetch(16'h4130);                          // inner RET
    check("trigger stays high after inner RET", cpu_trig == 1'b1);
    while ($realtime - t_reset < 3.3ms) fetch(16'h4303);
    fetch(16'h4130);                          // outer RET
    @(negedge clk_cpu);
    check("trigger low after outer RET", cpu_trig == 1'b0);
  end

  initial begin
    real f, mean_ma;
    repeat (4) @(posedge clk_sys);
    @(negedge clk_sys) rst_n = 1'b1;
    t_reset = $realtime;
    enable = 1'b1;
    #(6.7ms);

    // ---- periodic LT ----
    check($sformatf("periodic: %0d words saved", p_n_saved), p_n_saved == P_DEPTH);
    check("periodic: ISFULL", p_is_full);
    check("periodic: saving stopped", slow_t.size() > P_DEPTH);
    for (int k = 0; k < P_DEPTH; k++) begin
      @(negedge clk_sys) p_rd_addr = 3'(k);
      @(posedge clk_sys); #1;
      check($sformatf("periodic word %0d = %0d, converter %0d", k, p_rd_data, slow_pulses[k]),
            longint'(p_rd_data) <= slow_pulses[k] && longint'(p_rd_data) >= slow_pulses[k] - 1);
      if (k == 1) begin
        logic [31:0] w0;
        w0 = p_rd_data;
        @(negedge clk_sys) p_rd_addr = 3'd0;
        @(posedge clk_sys); #1;
        f = real'(w0 - p_rd_data) / 1.0e-3;
        mean_ma = ma_from_freq(f);
        check($sformatf("periodic: current 0.5-1.5 ms %.2f mA vs %.2f", mean_ma, I_A),
              mean_ma > 0.9 * I_A && mean_ma < 1.1 * I_A);
      end
      n_periodic_save++;
    end
    begin
      logic [31:0] w2, w5;
      @(negedge clk_sys) p_rd_addr = 3'd2;
      @(posedge clk_sys); #1 w2 = p_rd_data;
      @(negedge clk_sys) p_rd_addr = 3'd5;
      @(posedge clk_sys); #1 w5 = p_rd_data;
      f = real'(w5 - w2) / 3.0e-3;
      mean_ma = ma_from_freq(f);
      check($sformatf("periodic: current 2.5-5.5 ms %.2f mA vs %.2f", mean_ma, I_B),
            mean_ma > 0.985 * I_B && mean_ma < 1.015 * I_B);
    end

    // ---- spaced LT ----
    check($sformatf("spaced LT: %0d pairs", l_n_saved), l_n_saved == L_DEPTH);
    check("spaced LT: ISFULL", l_is_full);
    begin
      int ts_exp[3] = '{1, 3, 4};
      for (int j = 0; j < 3; j++) begin
        @(negedge clk_sys) l_rd_addr = 2'(j);
        @(posedge clk_sys); #1;
        check($sformatf("spaced LT pair %0d time stamp %0d", j, l_rd_ts), l_rd_ts == ts_exp[j]);
        check($sformatf("spaced LT pair %0d count %0d, converter %0d", j, l_rd_count, slow_pulses[ts_exp[j]]),
              longint'(l_rd_count) <= slow_pulses[ts_exp[j]] && longint'(l_rd_count) >= slow_pulses[ts_exp[j]] - 1);
        n_lt_save++;
      end
      n_lt_skip = 2 + (slow_t.size() - 5);    // rises 0 and 2 (SAVE low), and those after ISFULL
    end

    // ---- spaced ST ----
    check("spaced ST: ISFULL", s_is_full);
    for (int j = 0; j < S_DEPTH; j++) begin
      real t_ms, exp_cyc, i_est, i_true;
      @(negedge clk_fast) s_rd_addr = 3'(j);
      @(posedge clk_fast); #1;
      t_ms = real'(s_rd_ts) * T_FAST / 1.0e6;
      i_true = (t_ms < 2.0) ? I_A : I_B;
      exp_cyc = u_ext.period_ns(i_true) / T_FAST;
      i_est = ma_from_freq(1.0e9 / (real'(s_rd_period) * T_FAST));
      if (t_ms >= 0.6 && t_ms <= 0.81) n_st_ext++;
      else if (t_ms >= 3.2 && t_ms <= 3.31) n_st_cpu++;
      else check($sformatf("spaced ST pair %0d time %.4f ms outside both windows", j, t_ms), 1'b0);
      check($sformatf("spaced ST pair %0d period %0d cycles vs %.1f", j, s_rd_period, exp_cyc),
            real'(s_rd_period) >= exp_cyc - 1.0 && real'(s_rd_period) <= exp_cyc + 1.0);
      check($sformatf("spaced ST pair %0d current %.3f vs %.2f mA", j, i_est, i_true),
            i_est > 0.99 * i_true && i_est < 1.01 * i_true);
    end

    // ---- every mechanism happened ----
    $display("periodic saves %0d, LT saves %0d, LT skips %0d, ST saves by SAVE %0d, by CALL/RET %0d, nested calls %0d",
             n_periodic_save, n_lt_save, n_lt_skip, n_st_ext, n_st_cpu, n_nest);
    check("periodic saves occurred", n_periodic_save > 0);
    check("spaced LT saves occurred", n_lt_save > 0);
    check("spaced LT skips occurred", n_lt_skip > 0);
    check("ST saves from st_save occurred", n_st_ext > 0);
    check("ST saves from the CALL/RET trigger occurred", n_st_cpu > 0);
    check("nested call occurred", n_nest > 0);
    check("live pulse count tracks the converter", longint'(p_count) <= pulses && longint'(p_count) >= pulses - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
