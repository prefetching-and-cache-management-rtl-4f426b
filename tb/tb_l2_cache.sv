// tb_l2_cache: checks the private L2 with its ECM epoch tags at the default
// size (256 KB, 8 ways, 16 MSHRs, 8-cycle hits), against the directory model.
//  * data: random reads and full-line writes over a few sets force misses,
//    evictions and dirty write-backs; every read is compared with a reference
//    memory kept by the testbench;
//  * latency: a hit answers exactly 8 cycles after the request is accepted;
//  * prefetch probes: a new line is issued, probed again while in flight it
//    is skipped as pending, after the fill it is skipped as present; an
//    exclusive prefetch of a Shared line is issued as an upgrade; a demand
//    miss to a line being prefetched joins the outstanding miss;
//  * ECM: in a set full of current-epoch lines, next-epoch prefetches take
//    ways up to their quota and are then throttled; a later demand miss of
//    the current epoch evicts one of its own lines, not the prefetched ones;
//    after an epoch advance, lines of the old epoch are evicted first;
//  * directory recalls: random invalidations and downgrades during the data
//    phase; dirty data they return must keep every later read correct.
`timescale 1ns/1ps
module tb_l2_cache;
  import ebp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  epoch_t cur_epoch;
  logic [3:0] quota_cur, quota_next;
  logic core_req_valid, core_req_ready, core_req_write, core_resp_valid;
  logic [PLINE_W-1:0] core_req_line;
  line_data_t core_req_wdata, core_resp_rdata;
  logic pf_valid, pf_ready, pf_excl, pf_done;
  logic [PLINE_W-1:0] pf_line;
  epoch_t pf_epoch;
  pf_outcome_e pf_outcome;
  logic mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready, mem_resp_excl;
  mem_op_e mem_req_op;
  logic [PLINE_W-1:0] mem_req_line;
  logic [3:0] mem_req_id, mem_resp_id;
  line_data_t mem_req_data, mem_resp_data;
  logic snp_valid, snp_ready, snp_inv, snp_resp_valid, snp_resp_hit, snp_resp_dirty;
  logic [PLINE_W-1:0] snp_line;
  line_data_t snp_resp_data;
  logic evict_valid;
  logic [PLINE_W-1:0] evict_line;

  l2_cache dut (.*);
  dir_model #(.IDW(4)) u_dir (.*);

  int checks = 0, failures = 0;
  int n_evict = 0, n_pf_done = 0;
  logic [PLINE_W-1:0] evicted[$];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (evict_valid) begin n_evict++; evicted.push_back(evict_line); end
    if (pf_done) n_pf_done++;
  end

  // reference memory
  line_data_t refm [logic [PLINE_W-1:0]];
  function automatic line_data_t ref_data(input logic [PLINE_W-1:0] l);
    line_data_t d;
    if (refm.exists(l)) return refm[l];
    for (int i = 0; i < 16; i++) d[i*32 +: 32] = 32'(l) * 32'h9E3779B1 + 32'(i);
    return d;
  endfunction
  function automatic logic [PLINE_W-1:0] mk(input int tag, input int set);
    return {25'(tag), 9'(set)};
  endfunction

  task automatic core_access(input bit wr, input logic [PLINE_W-1:0] l,
                             input line_data_t wd, output line_data_t rd, output int lat);
    @(negedge clk);
    core_req_valid = 1; core_req_write = wr; core_req_line = l; core_req_wdata = wd;
    @(posedge clk);
    while (!core_req_ready) @(posedge clk);
    #1 core_req_valid = 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!core_resp_valid);
    rd = core_resp_rdata;
    if (wr) refm[l] = wd;
  endtask

  task automatic rd_check(input logic [PLINE_W-1:0] l, output int lat);
    line_data_t d;
    core_access(0, l, '0, d, lat);
    check(d == ref_data(l), "read data");
  endtask

  task automatic probe(input logic [PLINE_W-1:0] l, input bit ex, input epoch_t e,
                       output pf_outcome_e o);
    @(negedge clk);
    pf_valid = 1; pf_line = l; pf_excl = ex; pf_epoch = e;
    #1;
    while (!pf_ready) begin @(negedge clk); #1; end
    o = pf_outcome;
    @(posedge clk); #1 pf_valid = 0;
  endtask

  task automatic wait_pf_done(input int target);
    int n = 0;
    while (n_pf_done < target && n < 1000) begin @(posedge clk); n++; end
    repeat (2) @(posedge clk);
  endtask

  int cnt_issued = 0, cnt_hit = 0, cnt_thr = 0, cnt_pend = 0;
  task automatic count_o(input pf_outcome_e o);
    case (o)
      PF_ISSUED: cnt_issued++;
      PF_SKIP_HIT: cnt_hit++;
      PF_SKIP_THROTTLE: cnt_thr++;
      default: cnt_pend++;
    endcase
  endtask

  initial begin
    int lat, gets0;
    line_data_t d;
    pf_outcome_e o;
    cur_epoch = 1; quota_cur = 0; quota_next = 0;
    core_req_valid = 0; core_req_write = 0; core_req_line = '0; core_req_wdata = '0;
    pf_valid = 0; pf_line = '0; pf_excl = 0; pf_epoch = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- latency and data
    rd_check(mk(7, 3), lat);
    check(lat > 8, "miss slower than hit");
    rd_check(mk(7, 3), lat);
    check(lat == 8, "hit latency 8");
    core_access(1, mk(7, 3), {16{32'hDEADBEEF}}, d, lat);
    rd_check(mk(7, 3), lat);
    check(lat == 8, "hit latency after write");

    // ---- random data traffic over 4 sets x 24 tags (3x the ways), with
    //      invalidations and downgrades from the directory
    u_dir.snp_rate = 40;
    for (int i = 0; i < 3000; i++) begin
      logic [PLINE_W-1:0] l;
      l = mk($urandom_range(0, 23), 40 + $urandom_range(0, 3));
      if ($urandom_range(0, 2) == 0) begin
        line_data_t w;
        for (int k = 0; k < 16; k++) w[k*32 +: 32] = $urandom;
        core_access(1, l, w, d, lat);
      end else rd_check(l, lat);
      if (i % 500 == 499) cur_epoch = cur_epoch + 1;
    end
    u_dir.snp_rate = 0;
    repeat (5) @(posedge clk);
    check(u_dir.n_putx > 0, "dirty write-backs happened");
    check(u_dir.n_inv > 0 && u_dir.n_dgr > 0, "invalidations and downgrades happened");
    check(u_dir.n_snp_dirty > 0, "dirty data returned to the directory");
    $display("inv=%0d dgr=%0d snp_hit=%0d snp_dirty=%0d", u_dir.n_inv, u_dir.n_dgr,
             u_dir.n_snp_hit, u_dir.n_snp_dirty);
    check(n_evict > 0, "evictions happened");

    // ---- prefetch probe outcomes
    cur_epoch = 1; quota_cur = 4; quota_next = 4;
    u_dir.e_pct = 0;
    probe(mk(300, 200), 0, 2, o); count_o(o); check(o == PF_ISSUED, "new line issued");
    probe(mk(300, 200), 0, 2, o); count_o(o); check(o == PF_SKIP_PENDING, "pending skipped");
    wait_pf_done(1);
    check(n_pf_done == 1, "pf_done pulsed");
    probe(mk(300, 200), 0, 2, o); count_o(o); check(o == PF_SKIP_HIT, "present skipped");
    probe(mk(300, 200), 1, 2, o); count_o(o); check(o == PF_ISSUED, "upgrade issued");
    wait_pf_done(2);
    probe(mk(300, 200), 1, 2, o); count_o(o); check(o == PF_SKIP_HIT, "exclusive present skipped");
    // demand miss joins an outstanding prefetch
    gets0 = u_dir.n_gets + u_dir.n_getx;
    probe(mk(301, 200), 0, 1, o); count_o(o); check(o == PF_ISSUED, "second prefetch");
    rd_check(mk(301, 200), lat);
    check(u_dir.n_gets + u_dir.n_getx == gets0 + 1, "demand joined prefetch miss");
    wait_pf_done(3);

    // ---- ECM quotas and throttling in set 100
    cur_epoch = 1; quota_cur = 6; quota_next = 2;
    for (int t = 0; t < 8; t++) rd_check(mk(500 + t, 100), lat);   // full of epoch 1
    for (int t = 0; t < 8; t++) rd_check(mk(500 + t, 100), lat);   // all hits
    n_evict = 0; evicted.delete();
    probe(mk(600, 100), 0, 2, o); count_o(o); check(o == PF_ISSUED, "next epoch below quota");
    probe(mk(601, 100), 0, 2, o); count_o(o); check(o == PF_ISSUED, "next epoch below quota 2");
    wait_pf_done(5);
    check(n_evict == 2, "two current lines evicted for next epoch");
    probe(mk(602, 100), 0, 2, o); count_o(o); check(o == PF_SKIP_THROTTLE, "next epoch at quota throttled");
    // current epoch misses evict its own lines, not the prefetched next-epoch data
    for (int t = 0; t < 4; t++) rd_check(mk(700 + t, 100), lat);
    foreach (evicted[i]) check(evicted[i] != mk(600, 100) && evicted[i] != mk(601, 100),
                               "prefetched lines kept");
    probe(mk(600, 100), 0, 2, o); count_o(o); check(o == PF_SKIP_HIT, "prefetched line 600 present");
    probe(mk(601, 100), 0, 2, o); count_o(o); check(o == PF_SKIP_HIT, "prefetched line 601 present");
    // advance: epoch 2 is current, epoch 1 lines are old and go first
    cur_epoch = 2; quota_cur = 2; quota_next = 0;
    n_evict = 0; evicted.delete();
    for (int t = 0; t < 6; t++) rd_check(mk(800 + t, 100), lat);
    check(n_evict == 6, "six evictions");
    foreach (evicted[i]) check(evicted[i] != mk(600, 100) && evicted[i] != mk(601, 100),
                               "old epoch evicted first");
    // a prefetch hit on a line of an old epoch moves it to the prefetch's epoch
    cur_epoch = 4;
    probe(mk(600, 100), 0, 5, o); count_o(o); check(o == PF_SKIP_HIT, "hit on old line");
    for (int w = 0; w < 8; w++)
      if (dut.vld_q[100][w] && dut.tag_q[100][w] == 25'(600))
        check(dut.ep_q[100][w] == 3'd5, "old line re-marked with prefetch epoch");
    // a demand hit marks the line with the current epoch
    rd_check(mk(601, 100), lat);
    for (int w = 0; w < 8; w++)
      if (dut.vld_q[100][w] && dut.tag_q[100][w] == 25'(601))
        check(dut.ep_q[100][w] == 3'd4, "demand hit marks current epoch");

    check(cnt_thr > 0 && cnt_pend > 0 && cnt_hit > 0 && cnt_issued > 0, "all outcomes seen");
    $display("evict=%0d putx=%0d issued=%0d hit=%0d thr=%0d pend=%0d", n_evict, u_dir.n_putx,
             cnt_issued, cnt_hit, cnt_thr, cnt_pend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
