// tb_ebp_request_engine: checks that the Request Engine turns 2D prefetch
// commands into exactly the expected sequence of physical cache lines.
// The testbench contains a TLB model (fixed virtual-to-physical mapping,
// some pages faulting, random latency) and an L2 prefetch-port model that
// answers each line with a random outcome, stalls at random and returns
// prefetch completions slowly, so the limit of 8 outstanding prefetches is
// reached. The expected line list is computed from the command fields
// (block b covers lines (addr+b*stride)/64 .. (addr+b*stride+size-1)/64,
// faulting pages dropped). Commands include negative strides, page
// crossings, unaligned blocks and zero-sized commands.
`timescale 1ns/1ps
module tb_ebp_request_engine;
  import ebp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_pop;
  ebp_cmd_t cmd;
  logic tlb_req_valid, tlb_req_ready, tlb_req_write, tlb_resp_valid, tlb_resp_fault;
  logic [VPN_W-1:0] tlb_req_vpn;
  logic [PPN_W-1:0] tlb_resp_ppn;
  logic pf_valid, pf_ready, pf_excl, pf_done, busy, fault_seen;
  logic [PLINE_W-1:0] pf_line;
  epoch_t pf_epoch;
  pf_outcome_e pf_outcome;
  logic [3:0] outstanding;
  int checks = 0, failures = 0;

  ebp_request_engine dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ----- TLB model
  function automatic logic [PPN_W-1:0] xlate(input logic [VPN_W-1:0] v);
    return PPN_W'(v ^ 36'h5A5A5A5) + 28'h100;
  endfunction
  function automatic bit faults(input logic [VPN_W-1:0] v, input bit w);
    return (v % 13 == 5) || (w && (v % 7 == 3));
  endfunction
  int tlb_wait;
  logic tlb_busy;
  logic [VPN_W-1:0] tlb_vpn_q;
  logic tlb_w_q;
  always @(posedge clk) begin
    tlb_resp_valid <= 0;
    if (tlb_req_valid && tlb_req_ready) begin
      tlb_busy <= 1; tlb_vpn_q <= tlb_req_vpn; tlb_w_q <= tlb_req_write;
      tlb_wait <= $urandom_range(0, 4);
    end else if (tlb_busy) begin
      if (tlb_wait == 0) begin
        tlb_busy <= 0; tlb_resp_valid <= 1;
        tlb_resp_ppn <= xlate(tlb_vpn_q); tlb_resp_fault <= faults(tlb_vpn_q, tlb_w_q);
      end else tlb_wait <= tlb_wait - 1;
    end
  end
  assign tlb_req_ready = !tlb_busy && !tlb_resp_valid;

  // ----- expected lines
  typedef struct packed { logic [PLINE_W-1:0] line; logic excl; epoch_t ep; } exp_t;
  exp_t expq[$];
  ebp_cmd_t cmdq[$];

  task automatic add_cmd(input ebp_cmd_t c);
    logic [VA_W-1:0] base;
    cmdq.push_back(c);
    base = c.addr;
    if (c.bsize == 0) return;
    for (int b = 0; b < int'(c.bnum); b++) begin
      logic [VLINE_W-1:0] first, last;
      first = base[VA_W-1:6];
      last  = VLINE_W'((base + VA_W'(c.bsize) - 1) >> 6);
      for (logic [VLINE_W-1:0] l = first; ; l++) begin
        logic [VPN_W-1:0] v;
        v = l[VLINE_W-1:6];
        if (!faults(v, c.op == OP_READ_WRITE))
          expq.push_back('{line: {xlate(v), l[5:0]}, excl: c.op == OP_READ_WRITE, ep: c.epoch});
        if (l == last) break;
      end
      base = base + VA_W'(signed'(c.stride));
    end
  endtask

  // ----- command source
  // queue head presented after every clock edge
  always @(posedge clk) begin
    if (cmd_pop) void'(cmdq.pop_front());
    #1;
    cmd_valid = cmdq.size() != 0;
    cmd = (cmdq.size() != 0) ? cmdq[0] : '0;
  end

  // ----- L2 prefetch port model
  int inflight = 0, max_inflight = 0, n_lines = 0, n_issued = 0, n_done_cnt = 0;
  pf_outcome_e next_out;
  always @(negedge clk) begin
    pf_ready   <= ($urandom_range(0, 3) != 0);
    next_out    = pf_outcome_e'($urandom_range(0, 5) < 3 ? 0 : $urandom_range(1, 3));
    pf_outcome <= next_out;
    pf_done    <= (inflight > 0) && ($urandom_range(0, 15) == 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (inflight >= 8) check(!pf_valid, "no request at 8 outstanding");
    check(int'(outstanding) == inflight, "outstanding count");
    if (pf_valid && pf_ready) begin
      exp_t e;
      n_lines++;
      if (expq.size() == 0) check(0, "unexpected line");
      else begin
        e = expq.pop_front();
        check(pf_line == e.line, "line address");
        check(pf_excl == e.excl, "permission");
        check(pf_epoch == e.ep, "epoch");
      end
    end
    inflight = inflight + ((pf_valid && pf_ready && pf_outcome == PF_ISSUED) ? 1 : 0)
                        - (pf_done ? 1 : 0);
    if (pf_valid && pf_ready && pf_outcome == PF_ISSUED) n_issued++;
    if (pf_done) n_done_cnt++;
    if (inflight > max_inflight) max_inflight = inflight;
  end

  initial begin
    cmd_valid = 0; cmd = '0;
    pf_ready = 0; pf_outcome = PF_ISSUED; pf_done = 0; tlb_busy = 0; tlb_resp_valid = 0;
    tlb_resp_ppn = 0; tlb_resp_fault = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // tile of 8 rows of 256 bytes, row pitch 8000 B (crosses pages), read-only
    add_cmd('{addr: 48'h10_0000_0040, bsize: 256, bnum: 8, stride: 8000, epoch: 3, op: OP_READ_ONLY});
    // unaligned blocks, negative stride, read-write
    add_cmd('{addr: 48'h20_0000_7FF0, bsize: 100, bnum: 5, stride: -4096, epoch: 4, op: OP_READ_WRITE});
    // empty command
    add_cmd('{addr: 48'h30_0000_0000, bsize: 0, bnum: 4, stride: 64, epoch: 4, op: OP_READ_ONLY});
    // one contiguous 32 KB block (a task argument the size of the L1)
    add_cmd('{addr: 48'h40_0000_1000, bsize: 32768, bnum: 1, stride: 0, epoch: 5, op: OP_READ_ONLY});
    // random commands
    for (int i = 0; i < 20; i++)
      add_cmd('{addr: {16'h0, $urandom}, bsize: $urandom_range(1, 2000), bnum: $urandom_range(1, 6),
                stride: $urandom_range(0, 20000) - 10000, epoch: 3'($urandom),
                op: ebp_op_e'($urandom_range(0, 1))});
    // wait for completion
    while (expq.size() != 0 || busy || cmdq.size() != 0) begin
      @(posedge clk); #1;
      if (busy == 0 && expq.size() != 0 && cmdq.size() == 0) break;
    end
    repeat (5) @(posedge clk);
    check(expq.size() == 0, "all expected lines produced");
    if (expq.size() != 0) $display("missing %0d lines", expq.size());
    check(max_inflight == 8, "reached 8 outstanding");
    check(inflight == 0 && outstanding == 0, "all credits returned");
    check(!busy, "idle at end");
    $display("lines=%0d issued=%0d max_inflight=%0d", n_lines, n_issued, max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
