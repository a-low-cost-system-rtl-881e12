// tb_call_ret_trigger: feeds instruction streams with CALLs in all addressing modes, RETs,
// look-alike words (RETI, other MOVs, an unmarked operand word equal to the CALL pattern) and
// nested calls, and compares trig cycle by cycle with a reference nesting count kept by the
// testbench.
`timescale 1ns/1ps
module tb_call_ret_trigger;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] instr = '0;
  logic        instr_valid = 1'b0, trig;
  int checks = 0, failures = 0;
  int depth = 0;
  int calls = 0, rets = 0, max_depth = 0;

  always #5 clk = ~clk;

  call_ret_trigger dut (.clk, .rst_n, .instr, .instr_valid, .trig);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Present one word for one cycle; update the reference after the clock edge.
  task automatic fetch(input logic [15:0] w, input logic v);
    @(negedge clk);
    instr = w; instr_valid = v;
    @(posedge clk);
    if (v && (w & 16'hFFC0) == 16'h1280) begin depth++; calls++; end
    else if (v && w == 16'h4130 && depth > 0) begin depth--; rets++; end
    if (depth > max_depth) max_depth = depth;
    #1 check($sformatf("trig after %h/%0b", w, v), trig, depth > 0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 check("idle after reset", trig, 0);
    fetch(16'h4130, 1'b1);                 // RET at depth 0: ignored
    fetch(16'h1300, 1'b1);                 // RETI: not a call or return
    fetch(16'h12B0, 1'b1);                 // CALL #imm
    fetch(16'h1280, 1'b0);                 // operand word, not an opcode
    fetch(16'h4303, 1'b1);                 // NOP
    fetch(16'h1285, 1'b1);                 // CALL R5 (nested)
    fetch(16'h4131, 1'b1);                 // MOV @SP+,R1: not RET
    fetch(16'h4130, 1'b1);                 // RET inner
    fetch(16'h4130, 1'b0);                 // unmarked word: ignored
    fetch(16'h4130, 1'b1);                 // RET outer
    for (int i = 0; i < 400; i++) begin
      int sel;
      sel = int'($urandom_range(0, 5));
      case (sel)
        0: w = 16'h1280 | 16'($urandom_range(0, 63));
        1, 2: w = 16'h4130;
        default: w = 16'($urandom);
      endcase
      fetch(w, 1'($urandom_range(0, 3) != 0));
    end
    checks++;
    if (max_depth < 2) begin failures++; $display("FAIL nesting never exercised"); end
    $display("calls=%0d rets=%0d max_depth=%0d", calls, rets, max_depth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
