// tb_ecm_regs: checks the ECM epoch and quota registers at the default
// geometry (256 KB, 8 ways, so one way is 32 KB). Quotas written in bytes
// must read back rounded up to whole ways; a quota that would over-book the
// cache is cut to the ways left by the other active epoch; an advance moves
// the next quota to the current one and wraps the epoch from 7 to 0.
`timescale 1ns/1ps
module tb_ecm_regs;
  import ebp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sel, write, ready;
  logic [7:0]  addr;
  logic [63:0] wdata, rdata;
  epoch_t      cur_epoch;
  logic [3:0]  quota_cur, quota_next;
  int checks = 0, failures = 0;

  ecm_regs dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    sel = 1; write = 1; addr = a; wdata = d;
    @(posedge clk); #1;
    sel = 0; write = 0;
  endtask


  task automatic expect_rd(input logic [7:0] a, input logic [63:0] v, input string what);
    addr = a; sel = 1; write = 0; #1;
    check(rdata == v, what);
    sel = 0;
  endtask

  initial begin
    sel = 0; write = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    check(cur_epoch == 0 && quota_cur == 0 && quota_next == 0, "reset");
    // 1 byte -> 1 way; 32768 -> 1 way; 32769 -> 2 ways
    wr(REG_ECM_QCUR, 1);          check(quota_cur == 1, "1 B -> 1 way");
    wr(REG_ECM_QCUR, 32768);      check(quota_cur == 1, "32 KB -> 1 way");
    wr(REG_ECM_QCUR, 32769);      check(quota_cur == 2, "32 KB+1 -> 2 ways");
    wr(REG_ECM_QCUR, 0);          check(quota_cur == 0, "0 -> 0 ways");
    wr(REG_ECM_QCUR, 100000);     check(quota_cur == 4, "100000 B -> 4 ways");
    expect_rd(REG_ECM_QCUR, 4, "read quota cur");
    // over-booking: 6 ways asked, only 4 left
    wr(REG_ECM_QNEXT, 6 * 32768); check(quota_next == 4, "over-book cut");
    wr(REG_ECM_QNEXT, 64'hFFFF_FFFF_FFFF_FFFF); check(quota_next == 4, "huge quota cut");
    wr(REG_ECM_QNEXT, 65536);     check(quota_next == 2, "next 2 ways");
    expect_rd(REG_ECM_QNEXT, 2, "read quota next");
    // advance: next quota becomes current, next cleared
    wr(REG_ECM_ADV, 0);
    check(cur_epoch == 1 && quota_cur == 2 && quota_next == 0, "advance");
    expect_rd(REG_ECM_EPOCH, 1, "read epoch");
    // wrap from 7 to 0
    wr(REG_ECM_EPOCH, 7);         check(cur_epoch == 7, "set epoch");
    wr(REG_ECM_ADV, 0);           check(cur_epoch == 0, "wrap");
    // random byte quotas against the formula
    for (int i = 0; i < 200; i++) begin
      logic [63:0] b; int exp_w, other;
      b = 64'($urandom_range(0, 300000));
      other = int'(quota_next);
      exp_w = int'((b + 32767) / 32768);
      if (exp_w > 8 - other) exp_w = 8 - other;
      wr(REG_ECM_QCUR, b);
      check(int'(quota_cur) == exp_w, "random quota");
      check(int'(quota_cur) + int'(quota_next) <= 8, "sum bound");
      wr(REG_ECM_QNEXT, 64'($urandom_range(0, 300000)));
    end
    check(ready, "always ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
