// pulse_counter: counts the rising edges of a signal.
//
// The input first passes through SYNC_STAGES flip-flops (two by default, for the asynchronous
// pin driven by the external current-to-frequency converter; zero for a signal that is already
// in the clk domain, such as CLK SLOW when the block serves as a time stamp counter). A
// two-state machine then waits for the input to be low (S_LOW) and, when it sees it high,
// moves to S_HIGH and increments the counter; it returns to S_LOW when the input falls. The
// machine resets into S_HIGH and the synchroniser resets to ones, so an input that is already
// high at reset is not counted.
//
// count is the number of rising edges since reset, modulo 2**W (a 32-bit count overflows after
// more than 5 hours at 200 kHz). It is registered and changes one cycle after the edge is seen;
// the edge is seen SYNC_STAGES cycles after it reaches sig_in. The input must stay high and low
// for at least one clk cycle each after synchronisation (fine for 200 kHz at 2 MHz).
//
// Counting rising edges with a state machine follows the reference design; the synchroniser
// and the reset state are this design's choice.
module pulse_counter #(
  parameter int unsigned W           = sem_pkg::CNT_W,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sig_in,
  output logic [W-1:0] count,
  output logic         edge_seen   // one cycle, the cycle the edge is counted
);

  typedef enum logic {S_LOW, S_HIGH} state_t;

  logic   sig_s;
  state_t state;

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

  assign edge_seen = (state == S_LOW) && sig_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HIGH;
      count <= '0;
    end else begin
      unique case (state)
        S_LOW:  if (sig_s)  begin state <= S_HIGH; count <= count + 1'b1; end
        S_HIGH: if (!sig_s) state <= S_LOW;
      endcase
    end
  end

endmodule
