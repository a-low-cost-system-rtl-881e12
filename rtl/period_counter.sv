// period_counter: measures the period of the input signal in reference clock cycles.
//
// This is the short-term measuring method: the reference clock (20 MHz by default) is much
// faster than the input (at most 200 kHz), so the number of clock periods that fit in one input
// period is inversely proportional to the input frequency, with an error of one clock period
// (under 1 % at 200 kHz and 20 MHz).
//
// The input passes through SYNC_STAGES flip-flops and a rising-edge detector. A counter
// restarts at 1 on every detected edge and otherwise counts up, saturating at its maximum. On
// every edge after the first one since reset, period takes the counter value (the number of clk
// cycles between this edge and the previous one) and valid pulses high for one cycle. Both are
// registered, one cycle after the edge is detected.
//
// The measuring principle follows the reference design; the counter structure, the saturation
// and the suppression of the first (partial) period are this design's choice.
module period_counter #(
  parameter int unsigned W           = sem_pkg::CNT_W,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sig_in,
  output logic [W-1:0] period,
  output logic         valid
);

  logic         sig_s, sig_q, rise, seen_first;
  logic [W-1:0] cnt;

  if (SYNC_STAGES == 0) begin : g_nosync
    assign sig_s = sig_in;
  end else begin : g_sync
    logic [SYNC_STAGES-1:0] sync_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sync_q <= '1;
      else        sync_q <= SYNC_STAGES'({sync_q, sig_in});
    end
    assign sig_s = sync_q[SYNC_STAGES-1];
  end

  // The synchroniser and sig_q reset high so that an input already high at reset is not taken
  // for an edge.
  assign rise = sig_s && !sig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q      <= 1'b1;
      cnt        <= '0;
      seen_first <= 1'b0;
      period     <= '0;
      valid      <= 1'b0;
    end else begin
      sig_q <= sig_s;
      valid <= rise && seen_first;
      if (rise) begin
        if (seen_first) period <= cnt;
        seen_first <= 1'b1;
        cnt        <= W'(1);
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
