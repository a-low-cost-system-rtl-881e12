// freq_div: derives the slow save clock (CLK SLOW) from the system clock (CLK SYS).
//
// A counter runs from 0 to DIV-1 on clk and wraps. clk_slow is low for the first DIV - DIV/2
// cycles of each period and high for the remaining DIV/2, so it is a registered, glitch-free
// square wave of period DIV cycles, in the clk domain. With the defaults (2 MHz / 819672) it
// runs at 2.44 Hz. The first rising edge comes DIV - DIV/2 cycles after reset, then one every
// DIV cycles.
//
// In the reference system the system clock itself comes from an FPGA PLL; that PLL is vendor
// IP and is not part of this block. Generating the 2.44 Hz clock with a counter, and keeping
// it in the system clock domain as a level that the control blocks edge-detect, is this
// design's choice: no PLL reaches 2.44 Hz.
module freq_div #(
  parameter int unsigned DIV = sem_pkg::SLOW_DIV   // clk cycles per clk_slow period, >= 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_slow
);

  localparam int unsigned LOW_CYC = DIV - DIV / 2;
  localparam int unsigned CW      = $clog2(DIV);

  logic [CW-1:0] cnt, cnt_nxt;

  always_comb begin
    if (cnt == CW'(DIV - 1)) cnt_nxt = '0;
    else                     cnt_nxt = cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      clk_slow <= 1'b0;
    end else begin
      cnt      <= cnt_nxt;
      clk_slow <= (cnt_nxt >= CW'(LOW_CYC));
    end
  end

  initial assert (DIV >= 2) else $error("freq_div: DIV must be at least 2");

endmodule
