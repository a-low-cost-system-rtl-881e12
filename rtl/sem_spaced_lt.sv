// sem_spaced_lt: spaced long-term self energy meter (Spaced SEM LT).
//
// Like the periodic meter, it accumulates the pulses of the current-to-frequency converter
// (f_in) and looks at every rising edge of CLK SLOW (2.44 Hz), but it stores only at the CLK
// SLOW edges where the save input is high. Because the stored words are then no longer evenly
// spaced, each carries a time stamp: a second pulse counter counts the CLK SLOW edges, and a
// second control block and RAM store its value next to the pulse count. The time stamp of a
// word is the number of CLK SLOW edges that came before the one that saved it, so the word was
// taken at (time stamp + 1) / 2.44 Hz after reset, give or take a cycle.
//
// Interface: all on clk_sys (2 MHz). f_in and save may be asynchronous; each passes through a
// two-flip-flop synchroniser, so save must be high for at least three clk_sys cycles around
// the CLK SLOW edge it is meant to select (in practice it is a level held by the application).
// rd_addr reads both RAMs at once (one cycle latency): rd_count and rd_ts. n_saved counts the
// stored pairs; is_full (ISFULL) rises when DEPTH pairs are stored and saving stops.
//
// The structure (second pulse counter, control block and RAM for the time stamp) follows the
// reference design; the depth (1024 pairs, 8 kB) and the save synchroniser are this design's
// choice.
module sem_spaced_lt #(
  parameter int unsigned CNT_W    = sem_pkg::CNT_W,
  parameter int unsigned TS_W     = sem_pkg::CNT_W,
  parameter int unsigned DEPTH    = sem_pkg::SPACED_DEPTH,
  parameter int unsigned SLOW_DIV = sem_pkg::SLOW_DIV,
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW      = $clog2(DEPTH + 1)
) (
  input  logic             clk_sys,
  input  logic             rst_n,
  input  logic             f_in,
  input  logic             save,
  input  logic [AW-1:0]    rd_addr,
  output logic [CNT_W-1:0] rd_count,
  output logic [TS_W-1:0]  rd_ts,
  output logic [CNT_W-1:0] count,
  output logic [TS_W-1:0]  timestamp,
  output logic             clk_slow,
  output logic [PW-1:0]    n_saved,
  output logic             is_full
);

  logic [1:0]       save_sync;
  logic             save_s;
  logic             c_we, t_we, t_full, unused_e0, unused_e1;
  logic [AW-1:0]    c_waddr, t_waddr;
  logic [CNT_W-1:0] c_wdata;
  logic [TS_W-1:0]  t_wdata;
  logic [PW-1:0]    t_n_saved;

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) save_sync <= '0;
    else        save_sync <= {save_sync[0], save};
  end
  assign save_s = save_sync[1];

  freq_div #(.DIV(SLOW_DIV)) u_div (
    .clk(clk_sys), .rst_n, .clk_slow
  );

  pulse_counter #(.W(CNT_W), .SYNC_STAGES(2)) u_cnt (
    .clk(clk_sys), .rst_n, .sig_in(f_in), .count, .edge_seen(unused_e0)
  );

  // Time stamp: counts CLK SLOW edges; CLK SLOW is already in the clk_sys domain.
  pulse_counter #(.W(TS_W), .SYNC_STAGES(0)) u_ts (
    .clk(clk_sys), .rst_n, .sig_in(clk_slow), .count(timestamp), .edge_seen(unused_e1)
  );

  save_ctrl #(.DEPTH(DEPTH), .DW(CNT_W), .TRIGGERED(1'b1)) u_ctrl_cnt (
    .clk(clk_sys), .rst_n, .save_clk(clk_slow), .save(save_s), .din(count),
    .we(c_we), .waddr(c_waddr), .wdata(c_wdata), .n_saved, .is_full
  );

  save_ctrl #(.DEPTH(DEPTH), .DW(TS_W), .TRIGGERED(1'b1)) u_ctrl_ts (
    .clk(clk_sys), .rst_n, .save_clk(clk_slow), .save(save_s), .din(timestamp),
    .we(t_we), .waddr(t_waddr), .wdata(t_wdata), .n_saved(t_n_saved), .is_full(t_full)
  );

  sem_ram #(.DEPTH(DEPTH), .DW(CNT_W)) u_ram_cnt (
    .clk(clk_sys), .we(c_we), .waddr(c_waddr), .wdata(c_wdata), .raddr(rd_addr), .rdata(rd_count)
  );

  sem_ram #(.DEPTH(DEPTH), .DW(TS_W)) u_ram_ts (
    .clk(clk_sys), .we(t_we), .waddr(t_waddr), .wdata(t_wdata), .raddr(rd_addr), .rdata(rd_ts)
  );

  // The two control blocks see the same events and must stay in step.
  assert property (@(posedge clk_sys) disable iff (!rst_n)
                   (c_we == t_we) && (n_saved == t_n_saved) && (is_full == t_full));

endmodule
