// sem_spaced_st: spaced short-term self energy meter (Spaced SEM ST).
//
// For short events, such as one routine of a processor, the meter measures every period of the
// current-to-frequency converter output (f_in) in cycles of a fast reference clock (20 MHz by
// default, giving under 1 % error at the highest input frequency of 200 kHz). While save is
// high, each completed input period is stored in one RAM and a time stamp, the value of a
// free-running clk_fast cycle counter at the edge that closed the period, in a second RAM. The
// current over each period is inversely proportional to the stored period; since each input
// pulse stands for the same charge, the number of words stored between two triggers measures
// the energy used between them, and the time stamps place every period in time.
//
// Interface: all on clk_fast. f_in and save may be asynchronous; each passes through a
// two-flip-flop synchroniser. rd_addr reads both RAMs (one cycle latency): rd_period and
// rd_ts. n_saved counts the stored pairs; is_full (ISFULL) rises when DEPTH pairs are stored
// and saving stops. A period is stored when the edge that ends it is detected while save is
// high; the first period after reset is not measured. Timing: the pair is written 4 cycles
// after the closing edge reaches f_in.
//
// The measuring principle, the SAVE trigger and the 20 MHz reference follow the reference
// design; what is stored, the time stamp clock and the depth (1024 pairs) are this design's
// choice.
module sem_spaced_st #(
  parameter int unsigned PER_W = sem_pkg::CNT_W,
  parameter int unsigned TS_W  = sem_pkg::CNT_W,
  parameter int unsigned DEPTH = sem_pkg::SPACED_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW   = $clog2(DEPTH + 1)
) (
  input  logic             clk_fast,
  input  logic             rst_n,
  input  logic             f_in,
  input  logic             save,
  input  logic [AW-1:0]    rd_addr,
  output logic [PER_W-1:0] rd_period,
  output logic [TS_W-1:0]  rd_ts,
  output logic [PER_W-1:0] period,
  output logic [TS_W-1:0]  timestamp,
  output logic [PW-1:0]    n_saved,
  output logic             is_full
);

  logic [1:0]       save_sync;
  logic             save_s, per_valid;
  logic             p_we, t_we, t_full;
  logic [AW-1:0]    p_waddr, t_waddr;
  logic [PER_W-1:0] p_wdata;
  logic [TS_W-1:0]  t_wdata, ts_at_edge;
  logic [PW-1:0]    t_n_saved;

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) save_sync <= '0;
    else        save_sync <= {save_sync[0], save};
  end
  assign save_s = save_sync[1];

  period_counter #(.W(PER_W), .SYNC_STAGES(2)) u_per (
    .clk(clk_fast), .rst_n, .sig_in(f_in), .period, .valid(per_valid)
  );

  // Free-running time base; the value one cycle before valid is the closing edge's cycle.
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      timestamp  <= '0;
      ts_at_edge <= '0;
    end else begin
      timestamp  <= timestamp + 1'b1;
      ts_at_edge <= timestamp;
    end
  end

  save_ctrl #(.DEPTH(DEPTH), .DW(PER_W), .TRIGGERED(1'b1)) u_ctrl_per (
    .clk(clk_fast), .rst_n, .save_clk(per_valid), .save(save_s), .din(period),
    .we(p_we), .waddr(p_waddr), .wdata(p_wdata), .n_saved, .is_full
  );

  save_ctrl #(.DEPTH(DEPTH), .DW(TS_W), .TRIGGERED(1'b1)) u_ctrl_ts (
    .clk(clk_fast), .rst_n, .save_clk(per_valid), .save(save_s), .din(ts_at_edge),
    .we(t_we), .waddr(t_waddr), .wdata(t_wdata), .n_saved(t_n_saved), .is_full(t_full)
  );

  sem_ram #(.DEPTH(DEPTH), .DW(PER_W)) u_ram_per (
    .clk(clk_fast), .we(p_we), .waddr(p_waddr), .wdata(p_wdata), .raddr(rd_addr), .rdata(rd_period)
  );

  sem_ram #(.DEPTH(DEPTH), .DW(TS_W)) u_ram_ts (
    .clk(clk_fast), .we(t_we), .waddr(t_waddr), .wdata(t_wdata), .raddr(rd_addr), .rdata(rd_ts)
  );

  assert property (@(posedge clk_fast) disable iff (!rst_n)
                   (p_we == t_we) && (n_saved == t_n_saved) && (is_full == t_full));

endmodule
