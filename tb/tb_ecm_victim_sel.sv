// tb_ecm_victim_sel: checks the ECM victim choice and throttle signal.
// Directed cases with hand-worked answers come first (invalid way first, old
// epoch before active epochs, own-epoch victim when at quota, other epoch's
// line when below quota, NRU reference bits within the chosen group, throttle
// only when the set is full of active lines and the quota is used, epoch
// wrap-around). Then random sets are compared against a reference model that
// works from way lists rather than bit masks.
`timescale 1ns/1ps
module tb_ecm_victim_sel;
  import ebp_pkg::*;
  localparam int W = 8;

  logic [W-1:0] valid, ref_bit, ref_clear;
  epoch_t       epoch [W];
  epoch_t       cur_epoch, req_epoch;
  logic [3:0]   quota_cur, quota_next;
  logic [2:0]   victim, reason;
  logic         throttle;
  int checks = 0, failures = 0;

  ecm_victim_sel #(.WAYS(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference model
  function automatic void model(output int v, output bit thr, output logic [W-1:0] clr);
    int inv[$], old[$], own[$], oth[$], all[$], c[$];
    epoch_t nx;
    bit ra;
    int q;
    nx = cur_epoch + 1;
    ra = (req_epoch == cur_epoch) || (req_epoch == nx);
    q  = (req_epoch == cur_epoch) ? int'(quota_cur) : int'(quota_next);
    for (int w = 0; w < W; w++) begin
      all.push_back(w);
      if (!valid[w]) inv.push_back(w);
      else if (epoch[w] != cur_epoch && epoch[w] != nx) old.push_back(w);
      else if (ra && epoch[w] == req_epoch) own.push_back(w);
      else oth.push_back(w);
    end
    if (inv.size() > 0) c = inv;
    else if (old.size() > 0) c = old;
    else if (!ra) c = all;
    else if (own.size() < q || own.size() == 0) c = oth;
    else c = own;
    thr = ra && inv.size() == 0 && old.size() == 0 && own.size() >= q;
    v = -1;
    foreach (c[i]) if (v < 0 && !ref_bit[c[i]]) v = c[i];
    clr = '0;
    if (v < 0) begin
      v = c[0];
      foreach (c[i]) clr[c[i]] = 1'b1;
    end
  endfunction

  task automatic set_eps(input int e0, e1, e2, e3, e4, e5, e6, e7);
    epoch[0] = 3'(e0); epoch[1] = 3'(e1); epoch[2] = 3'(e2); epoch[3] = 3'(e3);
    epoch[4] = 3'(e4); epoch[5] = 3'(e5); epoch[6] = 3'(e6); epoch[7] = 3'(e7);
  endtask

  task automatic expect_v(input int v, input bit thr, input string what);
    #1;
    check(victim == 3'(v), {what, " victim"});
    check(throttle == thr, {what, " throttle"});
  endtask

  initial begin
    int v; bit thr; logic [W-1:0] clr;
    // 1. an invalid way is taken first
    cur_epoch = 2; req_epoch = 2; quota_cur = 4; quota_next = 4;
    valid = 8'b1101_1111; ref_bit = '1; set_eps(2,2,2,2,2,2,2,2);
    expect_v(5, 0, "invalid");
    // 2. old-epoch line before any active line, NRU among old lines
    valid = '1; set_eps(2,3,0,2,7,3,2,2); ref_bit = 8'b0000_0100;
    expect_v(4, 0, "old");
    // 3. set full of active lines, current at quota 4 with 4 lines: own victim
    set_eps(2,3,2,3,2,3,2,3); ref_bit = 8'b0000_0101;
    quota_cur = 4; quota_next = 4; req_epoch = 2;
    expect_v(4, 1, "own at quota");
    // 4. next epoch below its quota (2 lines, quota 5): takes a current line
    set_eps(2,2,2,2,3,2,3,2); ref_bit = 8'b0000_0000;
    req_epoch = 3; quota_cur = 3; quota_next = 5;
    expect_v(0, 0, "other below quota");
    // 5. all lines current, quotas zero: plain NRU over the set
    set_eps(2,2,2,2,2,2,2,2); ref_bit = 8'b1111_1011; req_epoch = 2;
    quota_cur = 0; quota_next = 0;
    expect_v(2, 1, "all current NRU");
    // 6. all reference bits set: lowest candidate, clear the group
    ref_bit = '1; #1;
    check(victim == 0 && ref_clear == 8'hFF, "NRU clear");
    // 7. wrap-around: current 7, next 0
    cur_epoch = 7; req_epoch = 0; set_eps(7,7,7,7,0,0,6,7); ref_bit = '0;
    quota_cur = 4; quota_next = 4;
    expect_v(6, 0, "wrap old");
    // random comparison against the model
    for (int i = 0; i < 20000; i++) begin
      valid = ($urandom_range(0, 3) == 0) ? 8'($urandom) : '1;
      ref_bit = 8'($urandom);
      cur_epoch = 3'($urandom);
      for (int w = 0; w < W; w++)
        epoch[w] = ($urandom_range(0, 3) == 0) ? 3'($urandom) : cur_epoch + 3'($urandom_range(0, 1));
      req_epoch = ($urandom_range(0, 7) == 0) ? 3'($urandom) : cur_epoch + 3'($urandom_range(0, 1));
      quota_cur = 4'($urandom_range(0, 8));
      quota_next = 4'($urandom_range(0, 8 - quota_cur));
      #1;
      model(v, thr, clr);
      check(victim == 3'(v), "random victim");
      check(throttle == thr, "random throttle");
      check(ref_clear == clr, "random ref_clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
