// tb_workloads: runs task sequences shaped like the six benchmark kernels a
// task runtime would execute (dense matrix multiply, Jacobi stencil, 2D FFT
// transposition, bitonic merge, Cholesky and sparse LU tile updates) through
// the whole L2 subsystem at its default parameters, and compares L2 misses
// with and without the bulk prefetcher and epoch-based cache management.
//
// How: each kernel is described by the footprint of its tasks, up to three
// 2D arguments (start address, row bytes, rows, row stride, read-only or
// read-write), at the array sizes of the benchmarks (1000x1000 and 1280x1280
// doubles, 1M complex points as a 1024x1024 matrix of 16-byte elements, 1M
// 8-byte keys) with tiles of about 32 KB per task. Only the first NTASK
// tasks of each kernel are run. The task mix is this testbench's own model
// of the kernels, not a trace.
//  * Baseline pass: the tasks run without prefetch commands or quotas; every
//    read whose answer takes longer than the 8-cycle hit latency is a miss.
//  * EBP+ECM pass, on a fresh copy of the same arrays: before task k runs,
//    the runtime advances the epoch, gives task k+1 a quota equal to its
//    footprint and posts one prefetch command per argument of task k+1
//    (read-write arguments with Exclusive permission), then task k runs.
// Each task reads every line of its arguments and writes every line of its
// read-write arguments; all read data is checked against a reference memory.
// Checks: the EBP+ECM pass misses at most 20% of the baseline's misses on the
// kernels whose tiles spread over the sets, never misses more than the
// baseline on the FFT transposition (whose 16 KB row stride folds each tile
// onto few sets), and ECM throttles prefetches there.
// Interfaces: the top's ports, with the directory and TLB models of tb/.
`timescale 1ns/1ps
module tb_workloads;
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
  dir_model #(.IDW(4), .LAT_MIN(20), .LAT_MAX(80)) u_dir (.*);
  tlb_model #(.MAX_LAT(4)) u_tlb (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int ev_thr = 0, ev_issued = 0;
  always @(posedge clk) if (rst_n && dut.pf_valid && dut.pf_ready) begin
    if (dut.pf_outcome == PF_SKIP_THROTTLE) ev_thr <= ev_thr + 1;
    if (dut.pf_outcome == PF_ISSUED) ev_issued <= ev_issued + 1;
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
    while (!mmio_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    mmio_valid = 0; mmio_write = 0;
  endtask

  task automatic mmio_rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    mmio_valid = 1; mmio_write = 0; mmio_addr = a; #1;
    d = mmio_rdata;
    @(posedge clk); #1 mmio_valid = 0;
  endtask

  int n_reads = 0, n_miss = 0;
  task automatic core_access(input bit wr, input logic [VA_W-1:0] va);
    int lat;
    logic [PLINE_W-1:0] l;
    line_data_t wd;
    l = pa_line(va);
    for (int i = 0; i < 16; i++) wd[i*32 +: 32] = $urandom;
    @(negedge clk);
    core_req_valid = 1; core_req_write = wr; core_req_line = l; core_req_wdata = wd;
    @(posedge clk);
    while (!core_req_ready) @(posedge clk);
    #1 core_req_valid = 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!core_resp_valid);
    check(lat >= 8, "no response before 8 cycles");
    if (wr) refm[l] = wd;
    else begin
      check(core_resp_rdata == ref_data(l), "read data");
      n_reads++;
      if (lat > 8) n_miss++;
    end
  endtask

  // ------------------------------------------------------- kernel footprints
  typedef struct {
    logic [VA_W-1:0] va;
    int bsize, bnum, stride;
    bit rw;
  } arg_t;
  localparam int NTASK = 12, NWL = 6;
  localparam int R1000 = 1000 * 8, R1280 = 1280 * 8, RFFT = 1024 * 16;
  localparam int L_MM = 36, L_JAC = 44;
  string wl_name [NWL] = '{"matmul", "jacobi", "fft", "bitonic", "cholesky", "sparselu"};

  // array number n of workload w; pass 1 uses a fresh copy of every array
  function automatic logic [VA_W-1:0] arr(input int w, input int pass, input int n);
    return 48'h1000_0000_0000 + 48'(w) * 48'h0100_0000_0000 + 48'(pass) * 48'h0010_0000_0000
           + 48'(n) * 48'h0001_0000_0000;
  endfunction

  function automatic arg_t mk(input logic [VA_W-1:0] va, input int bsize, input int bnum,
                              input int stride, input bit rw);
    arg_t a;
    a.va = va; a.bsize = bsize; a.bnum = bnum; a.stride = stride; a.rw = rw;
    return a;
  endfunction
  function automatic arg_t tile(input logic [VA_W-1:0] base, input int row_b, input int ti,
                                input int tj, input int l, input bit rw);
    return mk(base + 48'(ti * l) * 48'(row_b) + 48'(tj * l * 8), l * 8, l, row_b, rw);
  endfunction

  // the arguments of task k of workload w (narg returns how many)
  task automatic task_args(input int w, input int pass, input int k, output arg_t a [3],
                           output int narg);
    int jo, jh, fo, fo2, bo, bo2;
    jo = (1 + (k / 3) * L_JAC) * R1000 + (1 + (k % 3) * L_JAC) * 8;
    jh = jo - R1000 - 8;
    bo = k * 16384;
    bo2 = (k + 16) * 16384;
    fo = k * 32 * RFFT + (k + 1) * 512;
    fo2 = (k + 1) * 32 * RFFT + k * 512;
    narg = 3;
    case (w)
      0: begin  // C(0,0) += A(0,k) * B(k,0)
        a[0] = tile(arr(w, pass, 0), R1000, 0, k, L_MM, 0);
        a[1] = tile(arr(w, pass, 1), R1000, k, 0, L_MM, 0);
        a[2] = tile(arr(w, pass, 2), R1000, 0, 0, L_MM, 1);
      end
      1: begin  // out(tile) = stencil(in(tile plus a one-element halo))
        a[0] = mk(arr(w, pass, 0) + 48'(jh), (L_JAC + 2) * 8, L_JAC + 2, R1000, 0);
        a[1] = mk(arr(w, pass, 1) + 48'(jo), L_JAC * 8, L_JAC, R1000, 1);
        narg = 2;
      end
      2: begin  // transpose-swap of tiles (k, k+1) and (k+1, k), 32 x 512 B each
        a[0] = mk(arr(w, pass, 0) + 48'(fo), 512, 32, RFFT, 1);
        a[1] = mk(arr(w, pass, 0) + 48'(fo2), 512, 32, RFFT, 1);
        narg = 2;
      end
      3: begin  // merge of two 16 KB runs of keys, in place
        a[0] = mk(arr(w, pass, 0) + 48'(bo), 16384, 1, 0, 1);
        a[1] = mk(arr(w, pass, 0) + 48'(bo2), 16384, 1, 0, 1);
        narg = 2;
      end
      4: begin  // trailing update A(i,j) -= A(i,k) * A(j,k)^T, i = 13, j = 12
        a[0] = tile(arr(w, pass, 0), R1280, 13, k, L_MM, 0);
        a[1] = tile(arr(w, pass, 0), R1280, 12, k, L_MM, 0);
        a[2] = tile(arr(w, pass, 0), R1280, 13, 12, L_MM, 1);
      end
      default: begin  // update of a non-empty block (k+1, j) from (k+1, k) and (k, j), j = k+1 or k+3
        a[0] = tile(arr(w, pass, 0), R1280, k + 1, k, L_MM, 0);
        a[1] = tile(arr(w, pass, 0), R1280, k, k + 2 * (k % 2) + 1, L_MM, 0);
        a[2] = tile(arr(w, pass, 0), R1280, k + 1, k + 2 * (k % 2) + 1, L_MM, 1);
      end
    endcase
  endtask

  function automatic int footprint(input arg_t a [3], input int narg);
    int s = 0;
    for (int i = 0; i < narg; i++) s += a[i].bsize * a[i].bnum;
    return s;
  endfunction

  task automatic prefetch_task(input int w, input int k, input epoch_t e);
    arg_t a [3];
    int n;
    task_args(w, 1, k, a, n);
    for (int i = 0; i < n; i++) begin
      mmio_wr(REG_EBP_ADDR, 64'(a[i].va));
      mmio_wr(REG_EBP_BSIZE, 64'(a[i].bsize));
      mmio_wr(REG_EBP_BNUM, 64'(a[i].bnum));
      mmio_wr(REG_EBP_STRIDE, 64'(signed'(a[i].stride)));
      mmio_wr(REG_EBP_EPOCH, 64'(e));
      mmio_wr(REG_EBP_OPCODE, 64'(a[i].rw));
    end
  endtask

  task automatic run_task(input int w, input int pass, input int k);
    arg_t a [3];
    int n;
    logic [VA_W-1:0] first, last, row;
    task_args(w, pass, k, a, n);
    for (int i = 0; i < n; i++)
      for (int r = 0; r < a[i].bnum; r++) begin
        row = a[i].va + 48'(r * a[i].stride);
        first = row & ~48'h3F;
        last = row + 48'(a[i].bsize - 1);
        for (logic [VA_W-1:0] v = first; v <= last; v += 64) begin
          core_access(0, v);
          if (a[i].rw) core_access(1, v);
        end
      end
  endtask

  task automatic wait_idle();
    logic [63:0] rd;
    do begin repeat (20) @(posedge clk); mmio_rd(REG_EBP_STATUS, rd); end while (rd[8:0] != 0);
  endtask

  int miss [2][NWL], reads [2][NWL], thr [NWL], iss [NWL];

  initial begin
    arg_t a [3];
    int n;
    epoch_t e;
    mmio_valid = 0; mmio_write = 0; mmio_addr = 0; mmio_wdata = 0;
    core_req_valid = 0; core_req_write = 0; core_req_line = '0; core_req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    e = 0;
    for (int w = 0; w < NWL; w++) begin
      // baseline: no prefetching, no quotas
      n_reads = 0; n_miss = 0;
      for (int k = 0; k < NTASK; k++) run_task(w, 0, k);
      reads[0][w] = n_reads; miss[0][w] = n_miss;

      // EBP + ECM with double buffering
      ev_thr = 0; ev_issued = 0;
      n_reads = 0; n_miss = 0;
      mmio_wr(REG_ECM_ADV, 0); e++;
      task_args(w, 1, 0, a, n);
      mmio_wr(REG_ECM_QCUR, 64'(footprint(a, n)));
      prefetch_task(w, 0, e);
      wait_idle();
      for (int k = 0; k < NTASK; k++) begin
        if (k > 0) begin mmio_wr(REG_ECM_ADV, 0); e++; end
        if (k + 1 < NTASK) begin
          task_args(w, 1, k + 1, a, n);
          mmio_wr(REG_ECM_QNEXT, 64'(footprint(a, n)));
          prefetch_task(w, k + 1, e + 1);
        end else mmio_wr(REG_ECM_QNEXT, 0);
        run_task(w, 1, k);
      end
      wait_idle();
      reads[1][w] = n_reads; miss[1][w] = n_miss;
      thr[w] = ev_thr; iss[w] = ev_issued;
      $display("%-9s reads=%0d  L2 misses: baseline=%0d ebp+ecm=%0d  prefetches issued=%0d throttled=%0d",
               wl_name[w], reads[1][w], miss[0][w], miss[1][w], iss[w], thr[w]);
      check(reads[0][w] == reads[1][w], "same work in both passes");
      if (w == 2) begin
        check(miss[1][w] <= miss[0][w], "fft: no more misses than the baseline");
        check(thr[w] > 0, "fft: ECM throttles prefetches to full sets");
      end else
        check(miss[1][w] * 5 <= miss[0][w], "EBP+ECM removes at least 80% of the misses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
