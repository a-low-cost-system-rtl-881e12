// tb_sem_ram: writes random words to random addresses of a 64-word RAM while keeping a
// reference copy, then reads every written address back and checks the one-cycle read latency
// and the read-before-write behaviour of a simultaneous read and write of one address.
`timescale 1ns/1ps
module tb_sem_ram;
  localparam int unsigned DEPTH = 64, DW = 32;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [DEPTH];
  bit            valid [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sem_ram #(.DEPTH(DEPTH), .DW(DW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) valid[i] = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'($urandom); wdata = $urandom;
      model[waddr] = wdata; valid[waddr] = 1'b1;
    end
    @(negedge clk) we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      if (!valid[a]) continue;
      @(negedge clk) raddr = 6'(a);
      @(posedge clk); #1;
      check($sformatf("read %0d", a), rdata, model[a]);
    end
    // Same-address read and write: old data first, new data on the next read.
    @(negedge clk) raddr = 6'd5; we = 1'b1; waddr = 6'd5; wdata = 32'hCAFE_0005;
    @(posedge clk); #1;
    check("read during write returns old word", rdata, valid[5] ? model[5] : rdata);
    @(negedge clk) we = 1'b0;
    @(posedge clk); #1;
    check("read after write returns new word", rdata, 32'hCAFE_0005);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
