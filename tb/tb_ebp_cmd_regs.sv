// tb_ebp_cmd_regs: checks the EBP command registers. Field writes are read
// back; a write to Opcode must present all six fields as one command to the
// FIFO in the same cycle (the Opcode value selecting Read-Only or
// Read-Write); fields keep their values between commands; an Opcode write
// is held while the FIFO is full; STATUS reports depth and busy.
`timescale 1ns/1ps
module tb_ebp_cmd_regs;
  import ebp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sel, write, ready, cmd_valid, cmd_ready, engine_busy;
  logic [7:0]  addr;
  logic [63:0] wdata, rdata;
  ebp_cmd_t    cmd;
  logic [5:0]  fifo_count;
  int checks = 0, failures = 0;
  int pushes = 0;
  ebp_cmd_t got;

  ebp_cmd_regs dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always @(posedge clk) if (cmd_valid && cmd_ready) begin
    pushes++; got = cmd;
  end

  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    sel = 1; write = 1; addr = a; wdata = d;
    #1;
    while (!ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    sel = 0; write = 0;
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [63:0] v, input string what);
    addr = a; sel = 1; write = 0; #1;
    check(rdata == v, what);
    check(!cmd_valid, {what, " no push on read"});
    sel = 0;
  endtask

  initial begin
    int n;
    sel = 0; write = 0; addr = 0; wdata = 0; cmd_ready = 1; engine_busy = 0; fifo_count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    wr(REG_EBP_ADDR, 64'h0000_1234_5678_9ABC);
    wr(REG_EBP_BSIZE, 256);
    wr(REG_EBP_BNUM, 16);
    wr(REG_EBP_STRIDE, -64'sd8000);
    wr(REG_EBP_EPOCH, 5);
    check(pushes == 0, "no push before opcode");
    expect_rd(REG_EBP_ADDR, 64'h0000_1234_5678_9ABC, "read addr");
    expect_rd(REG_EBP_STRIDE, -64'sd8000, "read stride sign-extended");
    expect_rd(REG_EBP_EPOCH, 5, "read epoch");
    wr(REG_EBP_OPCODE, 1);
    check(pushes == 1, "one push");
    check(got.addr == 48'h1234_5678_9ABC && got.bsize == 256 && got.bnum == 16 &&
          got.stride == -32'sd8000 && got.epoch == 5 && got.op == OP_READ_WRITE, "command fields");
    // second command reuses all fields but epoch
    wr(REG_EBP_EPOCH, 6);
    wr(REG_EBP_OPCODE, 0);
    check(pushes == 2 && got.epoch == 6 && got.op == OP_READ_ONLY && got.bsize == 256, "fields kept");
    // FIFO full: Opcode write must wait
    cmd_ready = 0;
    sel = 1; write = 1; addr = REG_EBP_OPCODE; wdata = 1;
    n = 0;
    repeat (5) begin #1; if (!ready) n++; @(posedge clk); end
    check(n == 5 && pushes == 2, "held while full");
    #1; cmd_ready = 1; #1;
    check(ready, "released");
    @(posedge clk); #1; sel = 0; write = 0;
    check(pushes == 3, "pushed after release");
    // status
    fifo_count = 6'd17; engine_busy = 1;
    expect_rd(REG_EBP_STATUS, 64'h111, "status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
