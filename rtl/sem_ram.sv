// sem_ram: the on-chip memory that holds the saved measurements.
//
// A simple dual-port RAM of DEPTH words of DW bits: one synchronous write port, driven by a
// save_ctrl block, and one synchronous read port through which the application (or a debug
// interface exporting the contents) reads the record while the meter keeps running. rdata is
// the word at raddr one clk cycle after raddr is presented; a read of the address being
// written in the same cycle returns the old word. Written as an array so synthesis maps it to
// block RAM. The contents are not cleared at reset: only words below the control block's
// n_saved are meaningful.
//
// The reference design stores 4-byte measures in internal FPGA RAM; the second port and its
// timing are this design's choice.
module sem_ram #(
  parameter int unsigned DEPTH = sem_pkg::PERIODIC_DEPTH,
  parameter int unsigned DW    = sem_pkg::CNT_W,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
