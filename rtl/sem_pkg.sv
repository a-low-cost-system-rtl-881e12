// Shared constants of the self energy meter (SEM) core.
//
// The meter counts the pulses of an external current-to-frequency converter whose output
// frequency follows the FPGA core current (about 1 kHz to 200 kHz over the range of interest).
// The clock rates and sizes below are the reference configuration: a 2 MHz system clock, a
// 2.44 Hz save clock for the long-term (LT) versions, a 20 MHz reference clock for the
// short-term (ST) version, 32-bit counters and 4-byte memory words. SLOW_DIV is the divider
// that turns the 2 MHz system clock into the 2.44 Hz save clock (2e6 / 2.44, rounded).
// The RAM depths are this design's choice: 32 kB for the periodic version, and 4 kB for each
// of the two RAMs of each spaced version, so that all three versions together fit the 56 kB of
// block RAM of the reference device.
package sem_pkg;

  localparam int unsigned CLK_SYS_HZ   = 2_000_000;   // CLK SYS
  localparam int unsigned CLK_FAST_HZ  = 20_000_000;  // reference clock of the ST version
  localparam int unsigned SLOW_DIV     = 819_672;     // CLK SYS cycles per CLK SLOW period (2.44 Hz)

  localparam int unsigned CNT_W        = 32;          // pulse counter and time stamp width
  localparam int unsigned WORD_BYTES   = 4;           // one stored measure

  localparam int unsigned PERIODIC_DEPTH = 8192;      // 32 kB / 4 B
  localparam int unsigned SPACED_DEPTH   = 1024;      // per RAM, spaced LT and spaced ST

  // MSP430 instruction encodings watched by the subroutine trigger.
  localparam logic [15:0] MSP_CALL_MASK  = 16'hFFC0;  // CALL src: 0001 0010 10 As rrrr
  localparam logic [15:0] MSP_CALL_MATCH = 16'h1280;
  localparam logic [15:0] MSP_RET        = 16'h4130;  // RET = MOV @SP+, PC

endpackage
