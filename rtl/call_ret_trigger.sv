// call_ret_trigger: raises a measurement trigger while a processor subroutine runs.
//
// The block watches the instruction words an MSP430-compatible processor fetches from its
// program memory. instr_valid must mark the cycles in which instr holds an opcode word (not an
// immediate operand or an address extension word). A CALL (any addressing mode:
// 0001 0010 10xx xxxx) increments a nesting depth, a RET (MOV @SP+,PC, 0x4130) decrements it,
// and trig is high whenever the depth is above zero, so it covers the outermost subroutine
// together with everything it calls. A RET at depth zero is ignored and the depth saturates
// at its maximum. RETI (return from interrupt) is not counted.
//
// Timing: trig is registered; it rises the cycle after the CALL word is fetched and falls the
// cycle after the matching RET word is fetched. Connect it to the SAVE input of the spaced
// short-term meter to record the current profile of one routine.
//
// Capturing CALL and RET to build the trigger follows the reference design; the opcode
// decoding, the nesting counter and the fetch strobe are this design's choice.
module call_ret_trigger #(
  parameter int unsigned DEPTH_W = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] instr,
  input  logic        instr_valid,
  output logic        trig
);

  logic [DEPTH_W-1:0] depth;
  logic               is_call, is_ret;

  assign is_call = instr_valid && ((instr & sem_pkg::MSP_CALL_MASK) == sem_pkg::MSP_CALL_MATCH);
  assign is_ret  = instr_valid && (instr == sem_pkg::MSP_RET);
  assign trig    = (depth != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            depth <= '0;
    else if (is_call && depth != '1)       depth <= depth + 1'b1;
    else if (is_ret  && depth != '0)       depth <= depth - 1'b1;
  end

endmodule
