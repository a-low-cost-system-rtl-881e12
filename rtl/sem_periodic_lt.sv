// sem_periodic_lt: periodic long-term self energy meter (Periodic SEM LT).
//
// f_in is the output of the external current-to-frequency converter, whose frequency rises
// linearly with the FPGA core current. A pulse counter accumulates its rising edges since
// reset; at every rising edge of CLK SLOW (2.44 Hz, from the frequency divider) the control
// block stores the accumulated count in the RAM. The difference between two consecutive words
// times the CLK SLOW frequency is the mean input frequency, hence the mean current, over that
// interval; the last word alone is the charge, hence the energy, used since reset. When DEPTH
// words are stored, is_full (ISFULL) rises and saving stops; with the defaults (8192 words of
// 4 bytes) that takes about 56 minutes.
//
// Interface: everything runs on clk_sys (2 MHz); f_in may be asynchronous. count is the live
// accumulated pulse count, so the application can follow its own consumption in real time.
// rd_addr/rd_data read the record (one cycle latency); n_saved says how many words are valid.
// Timing: an input edge is counted 3 cycles after it reaches f_in; a word is written 2 cycles
// after CLK SLOW rises and holds the count of that cycle.
//
// The block structure (divider, pulse counter, control block, RAM) follows the reference
// design; the sizes are its numbers except the divider value, which is rounded.
module sem_periodic_lt #(
  parameter int unsigned CNT_W    = sem_pkg::CNT_W,
  parameter int unsigned DEPTH    = sem_pkg::PERIODIC_DEPTH,
  parameter int unsigned SLOW_DIV = sem_pkg::SLOW_DIV,
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW      = $clog2(DEPTH + 1)
) (
  input  logic             clk_sys,
  input  logic             rst_n,
  input  logic             f_in,
  input  logic [AW-1:0]    rd_addr,
  output logic [CNT_W-1:0] rd_data,
  output logic [CNT_W-1:0] count,
  output logic             clk_slow,
  output logic [PW-1:0]    n_saved,
  output logic             is_full
);

  logic             we;
  logic [AW-1:0]    waddr;
  logic [CNT_W-1:0] wdata;
  logic             unused_edge;

  freq_div #(.DIV(SLOW_DIV)) u_div (
    .clk(clk_sys), .rst_n, .clk_slow
  );

  pulse_counter #(.W(CNT_W), .SYNC_STAGES(2)) u_cnt (
    .clk(clk_sys), .rst_n, .sig_in(f_in), .count, .edge_seen(unused_edge)
  );

  save_ctrl #(.DEPTH(DEPTH), .DW(CNT_W), .TRIGGERED(1'b0)) u_ctrl (
    .clk(clk_sys), .rst_n, .save_clk(clk_slow), .save(1'b1), .din(count),
    .we, .waddr, .wdata, .n_saved, .is_full
  );

  sem_ram #(.DEPTH(DEPTH), .DW(CNT_W)) u_ram (
    .clk(clk_sys), .we, .waddr, .wdata, .raddr(rd_addr), .rdata(rd_data)
  );

endmodule
