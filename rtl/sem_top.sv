// sem_top: self energy meter (SEM) core for an FPGA that measures its own power.
//
// An external circuit turns the FPGA core supply current into a pulse train f_in whose
// frequency rises linearly with the current (about 1 kHz to 200 kHz). This core measures that
// frequency from inside the FPGA, so a design can record, or react to, its own consumption.
// It holds the three meter versions side by side on the same input:
//   * sem_periodic_lt: accumulated pulse count stored every CLK SLOW period (2.44 Hz); mean
//     current over each period and total energy since reset.
//   * sem_spaced_lt:   the same count, with a time stamp, stored only at CLK SLOW edges where
//     lt_save is high.
//   * sem_spaced_st:   every input period measured in 20 MHz cycles and stored with a time
//     stamp while the short-term trigger is high. The trigger is st_save, or the output of
//     call_ret_trigger, which is high while the processor under test (an MSP430-compatible
//     core on clk_cpu) runs a subroutine; st_use_cpu_trig selects between them.
//
// Clocks: clk_sys (2 MHz) for the two long-term meters, clk_fast (20 MHz) for the short-term
// one, clk_cpu for the trigger; they come from the device's PLL, outside this core. rst_n is an
// asynchronous active-low reset, to be released synchronously to each clock. Each meter has its
// own read port, live counters, n_saved and is_full (ISFULL).
//
// Each version is the reference design's; placing all three in one core and the selectable
// trigger source are this design's choice (in practice one would keep only the versions an
// experiment needs). Memory: 32 kB + 8 kB + 8 kB, within the 56 kB of the reference device.
module sem_top #(
  parameter int unsigned SLOW_DIV = sem_pkg::SLOW_DIV,
  parameter int unsigned P_DEPTH  = sem_pkg::PERIODIC_DEPTH,
  parameter int unsigned L_DEPTH  = sem_pkg::SPACED_DEPTH,
  parameter int unsigned S_DEPTH  = sem_pkg::SPACED_DEPTH,
  localparam int unsigned W       = sem_pkg::CNT_W,
  localparam int unsigned P_AW    = (P_DEPTH > 1) ? $clog2(P_DEPTH) : 1,
  localparam int unsigned L_AW    = (L_DEPTH > 1) ? $clog2(L_DEPTH) : 1,
  localparam int unsigned S_AW    = (S_DEPTH > 1) ? $clog2(S_DEPTH) : 1
) (
  input  logic                      clk_sys,
  input  logic                      clk_fast,
  input  logic                      clk_cpu,
  input  logic                      rst_n,
  input  logic                      f_in,
  // periodic LT
  input  logic [P_AW-1:0]           p_rd_addr,
  output logic [W-1:0]              p_rd_data,
  output logic [W-1:0]              p_count,
  output logic                      p_clk_slow,
  output logic [$clog2(P_DEPTH+1)-1:0] p_n_saved,
  output logic                      p_is_full,
  // spaced LT
  input  logic                      lt_save,
  input  logic [L_AW-1:0]           l_rd_addr,
  output logic [W-1:0]              l_rd_count,
  output logic [W-1:0]              l_rd_ts,
  output logic [W-1:0]              l_count,
  output logic [W-1:0]              l_timestamp,
  output logic                      l_clk_slow,
  output logic [$clog2(L_DEPTH+1)-1:0] l_n_saved,
  output logic                      l_is_full,
  // spaced ST and its subroutine trigger
  input  logic [15:0]               cpu_instr,
  input  logic                      cpu_instr_valid,
  input  logic                      st_save,
  input  logic                      st_use_cpu_trig,
  output logic                      cpu_trig,
  input  logic [S_AW-1:0]           s_rd_addr,
  output logic [W-1:0]              s_rd_period,
  output logic [W-1:0]              s_rd_ts,
  output logic [W-1:0]              s_period,
  output logic [W-1:0]              s_timestamp,
  output logic [$clog2(S_DEPTH+1)-1:0] s_n_saved,
  output logic                      s_is_full
);

  logic          s_trigger;

  sem_periodic_lt #(.CNT_W(W), .DEPTH(P_DEPTH), .SLOW_DIV(SLOW_DIV)) u_periodic (
    .clk_sys, .rst_n, .f_in, .rd_addr(p_rd_addr), .rd_data(p_rd_data), .count(p_count),
    .clk_slow(p_clk_slow), .n_saved(p_n_saved), .is_full(p_is_full)
  );

  sem_spaced_lt #(.CNT_W(W), .TS_W(W), .DEPTH(L_DEPTH), .SLOW_DIV(SLOW_DIV)) u_spaced_lt (
    .clk_sys, .rst_n, .f_in, .save(lt_save), .rd_addr(l_rd_addr), .rd_count(l_rd_count),
    .rd_ts(l_rd_ts), .count(l_count), .timestamp(l_timestamp), .clk_slow(l_clk_slow),
    .n_saved(l_n_saved), .is_full(l_is_full)
  );

  call_ret_trigger u_trig (
    .clk(clk_cpu), .rst_n, .instr(cpu_instr), .instr_valid(cpu_instr_valid), .trig(cpu_trig)
  );

  // Both trigger sources are levels; sem_spaced_st synchronises the result into clk_fast.
  assign s_trigger = st_use_cpu_trig ? cpu_trig : st_save;

  sem_spaced_st #(.PER_W(W), .TS_W(W), .DEPTH(S_DEPTH)) u_spaced_st (
    .clk_fast, .rst_n, .f_in, .save(s_trigger), .rd_addr(s_rd_addr), .rd_period(s_rd_period),
    .rd_ts(s_rd_ts), .period(s_period), .timestamp(s_timestamp), .n_saved(s_n_saved),
    .is_full(s_is_full)
  );

endmodule
