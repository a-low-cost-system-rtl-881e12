// save_ctrl: the control block that stores measurements into a SEM RAM.
//
// On every rising edge of save_clk (CLK SLOW in the long-term versions, the end-of-period
// strobe in the short-term version) the block writes din into the RAM at the next free
// address, provided the RAM is not full and, when TRIGGERED is set, the save input is high in
// that cycle. A write pointer counts the stored words; when it reaches DEPTH, is_full (ISFULL)
// rises and no further writes are made until reset. save_clk and save must be in the clk
// domain.
//
// Timing: the edge is detected at the first clk edge that sees save_clk high after a low
// (save_clk is compared with its registered copy); din and save are sampled at that clk edge;
// we/waddr/wdata are registered and valid until the next clk edge, which writes the RAM. n_saved and is_full update with the
// write outputs.
//
// Saving on the slow clock edge, the optional SAVE enable, and stopping with ISFULL when the
// memory is full follow the reference design; the edge detection and register timing are this
// design's choice.
module save_ctrl #(
  parameter int unsigned DEPTH     = sem_pkg::PERIODIC_DEPTH,
  parameter int unsigned DW        = sem_pkg::CNT_W,
  parameter bit          TRIGGERED = 1'b0,
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW       = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          save_clk,
  input  logic          save,
  input  logic [DW-1:0] din,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [DW-1:0] wdata,
  output logic [PW-1:0] n_saved,
  output logic          is_full
);

  logic save_clk_q;
  logic fire;

  assign is_full = (n_saved == PW'(DEPTH));
  assign fire    = save_clk && !save_clk_q && (!TRIGGERED || save) && !is_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      save_clk_q <= 1'b0;
      we         <= 1'b0;
      waddr      <= '0;
      wdata      <= '0;
      n_saved    <= '0;
    end else begin
      save_clk_q <= save_clk;
      we         <= fire;
      if (fire) begin
        waddr   <= AW'(n_saved);
        wdata   <= din;
        n_saved <= n_saved + 1'b1;
      end
    end
  end

  // A write never lands beyond the last word.
  assert property (@(posedge clk) disable iff (!rst_n) we |-> (32'(waddr) < DEPTH));

endmodule
