// ebp_ecm_top: one core's L2 subsystem with the Explicit Bulk Prefetcher
// (EBP) and Epoch-based Cache Management (ECM).
//
// The core's runtime software drives a small memory-mapped register window:
// offsets 0x00-0x3F are the EBP command registers, 0x40-0x7F the ECM epoch
// and quota registers. A write to the EBP Opcode register pushes a command
// into the 32-entry Command FIFO; the Request Engine splits it into cache
// lines, translates them through the core's TLB and offers them to the L2's
// prefetch port with the command's epoch. The L2 tags every line with an
// epoch (demand accesses with the current one), chooses victims with the
// epoch- and quota-aware policy, and throttles prefetches to sets that are
// full of active-epoch lines.
//
// External parts (not in this module): the core/L1 side of the L2 (core_*),
// the core's second-level TLB (tlb_*) and the coherence directory (mem_*
// for misses and write-backs, snp_* for its invalidations and downgrades).
// Register bus: sel/write/addr/wdata with ready and same-cycle rdata.
// Timing: see the sub-blocks; an L2 hit answers in HIT_LAT (8) cycles.
// The structure follows the document (Figures 1 and 2); the register window
// layout and the ports are this design's own.
module ebp_ecm_top
  import ebp_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 262144,
  parameter int unsigned WAYS        = 8,
  parameter int unsigned MSHRS       = 16,
  parameter int unsigned HIT_LAT     = 8,
  parameter int unsigned CMD_DEPTH   = 32,
  parameter int unsigned MAX_OUT     = 8,
  localparam int unsigned IDW        = $clog2(MSHRS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // register window
  input  logic               mmio_valid,
  input  logic               mmio_write,
  input  logic [7:0]         mmio_addr,
  input  logic [63:0]        mmio_wdata,
  output logic               mmio_ready,
  output logic [63:0]        mmio_rdata,
  // core / L1 side
  input  logic               core_req_valid,
  output logic               core_req_ready,
  input  logic               core_req_write,
  input  logic [PLINE_W-1:0] core_req_line,
  input  line_data_t         core_req_wdata,
  output logic               core_resp_valid,
  output line_data_t         core_resp_rdata,
  output logic               evict_valid,
  output logic [PLINE_W-1:0] evict_line,
  // TLB
  output logic               tlb_req_valid,
  input  logic               tlb_req_ready,
  output logic [VPN_W-1:0]   tlb_req_vpn,
  output logic               tlb_req_write,
  input  logic               tlb_resp_valid,
  input  logic [PPN_W-1:0]   tlb_resp_ppn,
  input  logic               tlb_resp_fault,
  // coherence directory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output mem_op_e            mem_req_op,
  output logic [PLINE_W-1:0] mem_req_line,
  output logic [IDW-1:0]     mem_req_id,
  output line_data_t         mem_req_data,
  input  logic               mem_resp_valid,
  output logic               mem_resp_ready,
  input  logic [IDW-1:0]     mem_resp_id,
  input  logic               mem_resp_excl,
  input  line_data_t         mem_resp_data,
  // requests from the directory (invalidate / downgrade)
  input  logic               snp_valid,
  output logic               snp_ready,
  input  logic [PLINE_W-1:0] snp_line,
  input  logic               snp_inv,
  output logic               snp_resp_valid,
  output logic               snp_resp_hit,
  output logic               snp_resp_dirty,
  output line_data_t         snp_resp_data
);
  localparam int unsigned QW  = $clog2(WAYS + 1);
  localparam int unsigned CW  = $clog2(CMD_DEPTH + 1);
  localparam int unsigned OW  = $clog2(MAX_OUT + 1);

  // register window decode
  logic        ebp_sel, ecm_sel, ebp_ready, ecm_ready;
  logic [63:0] ebp_rdata, ecm_rdata;
  assign ebp_sel    = mmio_valid && !mmio_addr[6];
  assign ecm_sel    = mmio_valid &&  mmio_addr[6];
  assign mmio_ready = mmio_addr[6] ? ecm_ready : ebp_ready;
  assign mmio_rdata = mmio_addr[6] ? ecm_rdata : ebp_rdata;

  // EBP
  logic     push_valid, push_ready, fifo_valid, fifo_pop, engine_busy, fault_seen;
  ebp_cmd_t push_cmd, head_cmd;
  logic [CW-1:0] fifo_count;
  logic [OW-1:0] outstanding;

  ebp_cmd_regs #(.CNT_W(CW)) u_regs (
    .clk, .rst_n,
    .sel(ebp_sel), .write(mmio_write), .addr(mmio_addr), .wdata(mmio_wdata),
    .ready(ebp_ready), .rdata(ebp_rdata),
    .cmd_valid(push_valid), .cmd_ready(push_ready), .cmd(push_cmd),
    .fifo_count, .engine_busy
  );

  sync_fifo #(.T(ebp_cmd_t), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n,
    .push_valid, .push_ready, .push_data(push_cmd),
    .pop_valid(fifo_valid), .pop(fifo_pop), .pop_data(head_cmd),
    .count(fifo_count)
  );

  logic               pf_valid, pf_ready, pf_excl, pf_done;
  logic [PLINE_W-1:0] pf_line;
  epoch_t             pf_epoch;
  pf_outcome_e        pf_outcome;

  ebp_request_engine #(.MAX_OUT(MAX_OUT)) u_engine (
    .clk, .rst_n,
    .cmd_valid(fifo_valid), .cmd(head_cmd), .cmd_pop(fifo_pop),
    .tlb_req_valid, .tlb_req_ready, .tlb_req_vpn, .tlb_req_write,
    .tlb_resp_valid, .tlb_resp_ppn, .tlb_resp_fault,
    .pf_valid, .pf_ready, .pf_line, .pf_excl, .pf_epoch, .pf_outcome, .pf_done,
    .busy(engine_busy), .outstanding, .fault_seen
  );

  // ECM
  epoch_t        cur_epoch;
  logic [QW-1:0] quota_cur, quota_next;

  ecm_regs #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS)) u_ecm (
    .clk, .rst_n,
    .sel(ecm_sel), .write(mmio_write), .addr(mmio_addr), .wdata(mmio_wdata),
    .ready(ecm_ready), .rdata(ecm_rdata),
    .cur_epoch, .quota_cur, .quota_next
  );

  // L2
  l2_cache #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .MSHRS(MSHRS),
             .HIT_LAT(HIT_LAT)) u_l2 (
    .clk, .rst_n,
    .cur_epoch, .quota_cur, .quota_next,
    .core_req_valid, .core_req_ready, .core_req_write, .core_req_line,
    .core_req_wdata, .core_resp_valid, .core_resp_rdata,
    .pf_valid, .pf_ready, .pf_line, .pf_excl, .pf_epoch, .pf_outcome, .pf_done,
    .mem_req_valid, .mem_req_ready, .mem_req_op, .mem_req_line, .mem_req_id,
    .mem_req_data, .mem_resp_valid, .mem_resp_ready, .mem_resp_id,
    .mem_resp_excl, .mem_resp_data,
    .snp_valid, .snp_ready, .snp_line, .snp_inv,
    .snp_resp_valid, .snp_resp_hit, .snp_resp_dirty, .snp_resp_data,
    .evict_valid, .evict_line
  );
endmodule
