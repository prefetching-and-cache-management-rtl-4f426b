// tb_ebp_ecm_top: end-to-end run of the L2 subsystem with EBP and ECM at its
// default parameters, driven the way a task runtime would drive it with
// double buffering. For each of 12 tasks the runtime
//   1. advances the epoch (wrapping after 8) and assigns the next task a
//      quota from its footprint,
//   2. programs the bulk prefetcher with the next task's arguments (a 2D
//      tile, an inout block fetched with Exclusive permission, and for two
//      tasks a pattern whose lines all fall into one cache set),
//   3. runs the current task: demand reads of all its lines through the
//      core port (physical addresses from the same translation as the TLB
//      model) and full-line writes of its inout block.
// Every read is checked against a reference memory. Before the tasks, a
// burst of 36 commands fills the Command FIFO. The testbench counts how often
// each mechanism happens (prefetch issued, skipped as present, skipped as
// pending, throttled by ECM, TLB fault drop, FIFO-full stall, 8 outstanding
// prefetches, eviction, dirty write-back, epoch wrap, quota over-booking
// cut, hit latency of 8 cycles, directory invalidation and downgrade) and
// fails if one never happened, and checks
// that most of each prefetched task's reads hit.
`timescale 1ns/1ps
module tb_ebp_ecm_top;
  import ebp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mmio_valid, mmio_write, mmio_ready;
  logic [7:0] mmio_addr;
  logic [63:0] mmio_wdata, mmio_rdata;
  logic core_req_valid, core_req_ready, core_req_write, core_resp_valid;
  logic [PLINE_W-1:0] core_req_line;
  line_data_t core_req_wdata, core_resp_rdata;
  logic evict_valid;
  logic [PLINE_W-1:0] evict_line;
  logic tlb_req_valid, tlb_req_ready, tlb_req_write, tlb_resp_valid, tlb_resp_fault;
  logic [VPN_W-1:0] tlb_req_vpn;
  logic [PPN_W-1:0] tlb_resp_ppn;
  logic mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready, mem_resp_excl;
  mem_op_e mem_req_op;
  logic [PLINE_W-1:0] mem_req_line;
  logic [3:0] mem_req_id, mem_resp_id;
  line_data_t mem_req_data, mem_resp_data;
  logic snp_valid, snp_ready, snp_inv, snp_resp_valid, snp_resp_hit, snp_resp_dirty;
  logic [PLINE_W-1:0] snp_line;
  line_data_t snp_resp_data;

  ebp_ecm_top dut (.*);
  dir_model #(.IDW(4), .LAT_MIN(20), .LAT_MAX(80), .SNP_PERMILLE(3)) u_dir (.*);
  tlb_model #(.MAX_LAT(4), .FAULT_MOD(4096), .FAULT_REM(4095)) u_tlb (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---------------------------------------------------------- event counters
  int ev_issued = 0, ev_hit = 0, ev_pend = 0, ev_thr = 0, ev_fault = 0, ev_fifo_full = 0;
  int ev_out8 = 0, ev_evict = 0, ev_wrap = 0, ev_clamp = 0, ev_hit_lat = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.pf_valid && dut.pf_ready)
      case (dut.pf_outcome)
        PF_ISSUED: ev_issued++;
        PF_SKIP_HIT: ev_hit++;
        PF_SKIP_PENDING: ev_pend++;
        default: ev_thr++;
      endcase
    if (dut.fault_seen) ev_fault++;
    if (dut.outstanding == 4'd8) ev_out8++;
    if (evict_valid) ev_evict++;
  end

  // ------------------------------------------------------ reference memory
  line_data_t refm [logic [PLINE_W-1:0]];
  function automatic line_data_t ref_data(input logic [PLINE_W-1:0] l);
    line_data_t d;
    if (refm.exists(l)) return refm[l];
    for (int i = 0; i < 16; i++) d[i*32 +: 32] = 32'(l) * 32'h9E3779B1 + 32'(i);
    return d;
  endfunction
  function automatic logic [PLINE_W-1:0] pa_line(input logic [VA_W-1:0] va);
    logic [VPN_W-1:0] v;
    v = va[VA_W-1:PAGE_OFF_W];
    return {PPN_W'(v) ^ 28'h0ABC000, va[PAGE_OFF_W-1:LINE_OFF_W]};
  endfunction

  // ------------------------------------------------------------- bus tasks
  task automatic mmio_wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk);
    mmio_valid = 1; mmio_write = 1; mmio_addr = a; mmio_wdata = d;
    #1;
    while (!mmio_ready) begin
      @(negedge clk); #1;
      if (a == REG_EBP_OPCODE) ev_fifo_full++;
    end
    @(posedge clk); #1;
    mmio_valid = 0; mmio_write = 0;
  endtask

  task automatic mmio_rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    mmio_valid = 1; mmio_write = 0; mmio_addr = a; #1;
    d = mmio_rdata;
    @(posedge clk); #1 mmio_valid = 0;
  endtask

  task automatic prefetch(input logic [VA_W-1:0] va, input int bsize, input int bnum,
                          input int stride, input epoch_t ep, input bit rw);
    mmio_wr(REG_EBP_ADDR, 64'(va));
    mmio_wr(REG_EBP_BSIZE, 64'(bsize));
    mmio_wr(REG_EBP_BNUM, 64'(bnum));
    mmio_wr(REG_EBP_STRIDE, 64'(signed'(stride)));
    mmio_wr(REG_EBP_EPOCH, 64'(ep));
    mmio_wr(REG_EBP_OPCODE, 64'(rw));
  endtask

  int n_reads = 0, n_read_hits = 0;
  task automatic core_access(input bit wr, input logic [VA_W-1:0] va, input line_data_t wd,
                             input bit count_hit);
    int lat;
    logic [PLINE_W-1:0] l;
    l = pa_line(va);
    @(negedge clk);
    core_req_valid = 1; core_req_write = wr; core_req_line = l; core_req_wdata = wd;
    @(posedge clk);
    while (!core_req_ready) @(posedge clk);
    #1 core_req_valid = 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!core_resp_valid);
    if (lat == 8) ev_hit_lat++;
    check(lat >= 8, "no response before 8 cycles");
    if (wr) refm[l] = wd;
    else begin
      check(core_resp_rdata == ref_data(l), "read data");
      if (count_hit) begin n_reads++; if (lat == 8) n_read_hits++; end
    end
  endtask

  // ---------------------------------------------------------- task layout
  localparam int NTASK = 12;
  function automatic logic [VA_W-1:0] tile_va(input int k);
    return 48'h10_0000_0000 + 48'(k) * 48'h4_0000;
  endfunction
  function automatic logic [VA_W-1:0] out_va(input int k);
    return 48'h20_0000_0000 + 48'(k % 3) * 48'h1000;
  endfunction
  function automatic logic [VA_W-1:0] conf_va(input int k);
    return 48'h30_0000_0000 + 48'(k) * 48'h100_0000;
  endfunction
  function automatic bit has_conf(input int k);
    return (k == 5) || (k == 6);
  endfunction
  localparam int TILE_ROWS = 16, TILE_ROW_B = 512, TILE_STRIDE = 8192;
  localparam int OUT_B = 4096;
  localparam int CONF_N = 12, CONF_STRIDE = 32768;

  task automatic post_task_prefetch(input int k);
    epoch_t e;
    e = epoch_t'(k);
    prefetch(tile_va(k), TILE_ROW_B, TILE_ROWS, TILE_STRIDE, e, 0);
    prefetch(out_va(k), OUT_B, 1, 0, e, 1);
    if (has_conf(k)) prefetch(conf_va(k), 64, CONF_N, CONF_STRIDE, e, 0);
  endtask

  task automatic run_task(input int k);
    line_data_t w;
    for (int r = 0; r < TILE_ROWS; r++)
      for (int b = 0; b < TILE_ROW_B; b += 64)
        core_access(0, tile_va(k) + 48'(r * TILE_STRIDE + b), '0, k > 0);
    if (has_conf(k))
      for (int i = 0; i < CONF_N; i++) core_access(0, conf_va(k) + 48'(i * CONF_STRIDE), '0, 0);
    for (int b = 0; b < OUT_B; b += 64) begin
      core_access(0, out_va(k) + 48'(b), '0, k > 0);
      for (int i = 0; i < 16; i++) w[i*32 +: 32] = $urandom;
      core_access(1, out_va(k) + 48'(b), w, 0);
    end
  endtask

  initial begin
    logic [63:0] rd;
    mmio_valid = 0; mmio_write = 0; mmio_addr = 0; mmio_wdata = 0;
    core_req_valid = 0; core_req_write = 0; core_req_line = '0; core_req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // burst of warm-up commands: 64 lines each, fields written once
    prefetch(48'h40_0000_0000, 4096, 1, 0, 0, 0);
    for (int j = 1; j < 36; j++) begin
      mmio_wr(REG_EBP_ADDR, 64'h40_0000_0000 + 64'(j) * 64'h1000);
      mmio_wr(REG_EBP_OPCODE, 0);
    end
    // a command touching a page without a mapping (dropped lines)
    prefetch(48'h50_00FF_F000, 4096, 1, 0, 0, 0);
    mmio_rd(REG_EBP_STATUS, rd);
    check(rd[8] == 1'b1, "engine busy after burst");
    do begin repeat (50) @(posedge clk); mmio_rd(REG_EBP_STATUS, rd); end while (rd[8:0] != 0);

    // the same 4 lines requested twice back to back: the second request
    // finds the first one's misses still outstanding
    prefetch(48'h60_0000_0000, 256, 1, 0, 0, 0);
    mmio_wr(REG_EBP_OPCODE, 0);
    do begin repeat (50) @(posedge clk); mmio_rd(REG_EBP_STATUS, rd); end while (rd[8:0] != 0);

    // task 0's data is prefetched up front
    mmio_wr(REG_ECM_QCUR, 8 * 1024 + OUT_B);
    post_task_prefetch(0);
    for (int k = 0; k < NTASK; k++) begin
      if (k > 0) begin
        mmio_wr(REG_ECM_ADV, 0);
        mmio_rd(REG_ECM_EPOCH, rd);
        check(rd == 64'(k % 8), "epoch register");
        if (k % 8 == 0) ev_wrap++;
      end
      // quota for the next task: footprint, or 2 ways for the set-conflict task
      mmio_wr(REG_ECM_QNEXT, has_conf(k + 1) ? 64'd65536 : 64'(TILE_ROWS * TILE_ROW_B + OUT_B));
      if (k == 3) begin
        // over-booking: ask 8 ways for the current task while next holds one
        mmio_wr(REG_ECM_QCUR, 64'd262144);
        mmio_rd(REG_ECM_QCUR, rd);
        check(rd == 64'd7, "over-booked quota cut to free ways");
        if (rd == 64'd7) ev_clamp++;
      end
      if (k == 5) mmio_wr(REG_ECM_QCUR, 64'd196608);   // 6 ways
      if (k + 1 < NTASK) post_task_prefetch(k + 1);
      run_task(k);
    end
    do begin repeat (20) @(posedge clk); mmio_rd(REG_EBP_STATUS, rd); end while (rd[8:0] != 0);

    $display("issued=%0d skip_hit=%0d skip_pending=%0d throttled=%0d fault_drop=%0d",
             ev_issued, ev_hit, ev_pend, ev_thr, ev_fault);
    $display("fifo_full_stall=%0d out8_cycles=%0d evict=%0d writeback=%0d wrap=%0d clamp=%0d hit8=%0d",
             ev_fifo_full, ev_out8, ev_evict, u_dir.n_putx, ev_wrap, ev_clamp, ev_hit_lat);
    $display("recalls: inv=%0d dgr=%0d hit=%0d dirty=%0d", u_dir.n_inv, u_dir.n_dgr,
             u_dir.n_snp_hit, u_dir.n_snp_dirty);
    $display("prefetched task reads: %0d of %0d hit", n_read_hits, n_reads);
    check(ev_issued > 0, "prefetch issued");
    check(ev_hit > 0, "prefetch skipped: present");
    check(ev_pend > 0, "prefetch skipped: pending");
    check(ev_thr > 0, "prefetch throttled by ECM");
    check(ev_fault > 0, "TLB fault drop");
    check(ev_fifo_full > 0, "command FIFO full stall");
    check(ev_out8 > 0, "8 outstanding prefetches");
    check(ev_evict > 0, "eviction");
    check(u_dir.n_putx > 0, "dirty write-back");
    check(ev_wrap > 0, "epoch wrap-around");
    check(ev_clamp > 0, "quota over-booking cut");
    check(ev_hit_lat > 0, "8-cycle hit");
    check(u_dir.n_inv > 0 && u_dir.n_dgr > 0, "directory invalidation and downgrade");
    check(n_read_hits * 10 >= n_reads * 8, "at least 80% of prefetched task reads hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
