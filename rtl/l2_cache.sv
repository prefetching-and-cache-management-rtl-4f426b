// l2_cache: private, coherent, set-associative L2 cache of one core, with
// the epoch tags of Epoch-based Cache Management (ECM) and the prefetch port
// used by the Explicit Bulk Prefetcher (EBP).
//
// Organisation: CACHE_BYTES of 64-byte lines in WAYS ways (256 KB, 8-way,
// 512 sets by default). Every line holds a tag, a MESI state, a valid bit,
// an NRU reference bit and an EPOCH_W-bit epoch number. Misses are tracked in
// MSHRS miss status holding registers and go to the coherence directory as
// GETS (Shared) or GETX (Exclusive, also used to upgrade a Shared line);
// dirty victims leave through a one-entry write-back buffer as PUTX.
//
// Three request streams share the tag state (the cache has two access ports,
// one for the core and one for prefetch probes, and a fill path):
//  * Core port (L1 misses and write-backs, one request at a time): a hit
//    marks the line with the current epoch and sets its reference bit; it
//    answers HIT_LAT cycles after the request was accepted. A read needs any
//    valid state, a write needs E or M and makes the line M. On a miss an
//    MSHR is allocated (or an outstanding one is joined) and the request is
//    looked up again every cycle until the fill has made it a hit.
//  * Prefetch port: a probe answered in the cycle it is made. A line present
//    with the requested permission is skipped (and, if it belongs to an old
//    epoch, moved to the prefetch's epoch); a line with a miss outstanding is
//    skipped; a new line whose set ECM reports full of active-epoch lines with
//    the requesting epoch's quota used is skipped (throttled); otherwise an
//    MSHR is allocated and the request sent, and pf_done pulses at its fill.
//  * Fill: the directory's response installs the line in the way chosen by
//    ecm_victim_sel for the epoch the miss was made in, in state E (exclusive
//    grant) or S, with its reference bit set.
//  * Directory requests (snp_*): invalidate (snp_inv=1) or downgrade to S
//    (snp_inv=0) a line; answered the next cycle with whether it was present,
//    whether it was dirty, and its data.
// Directory port: mem_req valid/ready with op, line, MSHR id and write-back
// data; mem_resp valid/ready with MSHR id, exclusive grant and line data.
// evict_* tells an inclusive L1 which line to drop (on eviction or
// invalidation).
//
// From the document: size, associativity, line size, NRU, 16 MSHRs, 8-cycle
// latency, the epoch in every tag, demand accesses marked with the current
// epoch, prefetches with their command's epoch, the probe/skip/throttle rules.
// This design's own: the port protocols, blocking core port, one write-back
// buffer, replay on miss, retagging of old lines on a prefetch hit, and the
// simple invalidate/downgrade request port.
module l2_cache
  import ebp_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 262144,
  parameter int unsigned WAYS        = 8,
  parameter int unsigned MSHRS       = 16,
  parameter int unsigned HIT_LAT     = 8,
  localparam int unsigned QW         = $clog2(WAYS + 1),
  localparam int unsigned IDW        = $clog2(MSHRS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // ECM state
  input  epoch_t             cur_epoch,
  input  logic [QW-1:0]      quota_cur,
  input  logic [QW-1:0]      quota_next,
  // core port
  input  logic               core_req_valid,
  output logic               core_req_ready,
  input  logic               core_req_write,
  input  logic [PLINE_W-1:0] core_req_line,
  input  line_data_t         core_req_wdata,
  output logic               core_resp_valid,
  output line_data_t         core_resp_rdata,
  // prefetch port
  input  logic               pf_valid,
  output logic               pf_ready,
  input  logic [PLINE_W-1:0] pf_line,
  input  logic               pf_excl,
  input  epoch_t             pf_epoch,
  output pf_outcome_e        pf_outcome,
  output logic               pf_done,
  // directory port
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
  // requests from the directory
  input  logic               snp_valid,
  output logic               snp_ready,
  input  logic [PLINE_W-1:0] snp_line,
  input  logic               snp_inv,
  output logic               snp_resp_valid,
  output logic               snp_resp_hit,
  output logic               snp_resp_dirty,
  output line_data_t         snp_resp_data,
  // inclusion
  output logic               evict_valid,
  output logic [PLINE_W-1:0] evict_line
);
  localparam int unsigned SETS  = CACHE_BYTES / (LINE_BITS / 8) / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = PLINE_W - IDX_W;
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned LW    = $clog2(HIT_LAT + 2);

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;

  // ------------------------------------------------------------ storage
  logic [WAYS-1:0] vld_q [SETS];
  logic [WAYS-1:0] ref_q [SETS];
  tag_t            tag_q [SETS][WAYS];
  mesi_e           st_q  [SETS][WAYS];
  epoch_t          ep_q  [SETS][WAYS];
  line_data_t      data_q[SETS][WAYS];

  // MSHRs
  logic [MSHRS-1:0]   m_vld_q;
  logic [PLINE_W-1:0] m_line_q [MSHRS];
  logic               m_pf_q   [MSHRS];
  epoch_t             m_ep_q   [MSHRS];

  // write-back buffer
  logic               wb_vld_q;
  logic [PLINE_W-1:0] wb_line_q;
  line_data_t         wb_data_q;

  function automatic idx_t idx_of(input logic [PLINE_W-1:0] l);
    return l[IDX_W-1:0];
  endfunction
  function automatic tag_t tag_of(input logic [PLINE_W-1:0] l);
    return l[PLINE_W-1:IDX_W];
  endfunction
  function automatic logic is_active(input epoch_t e, input epoch_t cur);
    return (e == cur) || (e == epoch_t'(cur + 1'b1));
  endfunction

  // free MSHR
  logic           m_free_any;
  logic [IDW-1:0] m_free_id;
  always_comb begin
    m_free_any = !(&m_vld_q);
    m_free_id  = '0;
    for (int i = MSHRS - 1; i >= 0; i--)
      if (!m_vld_q[i]) m_free_id = IDW'(i);
  end

  function automatic logic mshr_match(input logic [MSHRS-1:0] v,
                                      input logic [PLINE_W-1:0] lines [MSHRS],
                                      input logic [PLINE_W-1:0] l);
    logic m;
    m = 1'b0;
    for (int i = 0; i < MSHRS; i++)
      if (v[i] && lines[i] == l) m = 1'b1;
    return m;
  endfunction

  // ------------------------------------------------------------ core port
  typedef enum logic [1:0] {C_IDLE, C_LOOKUP, C_HOLD} cstate_e;
  cstate_e            c_state_q;
  logic               c_write_q;
  logic [PLINE_W-1:0] c_line_q;
  line_data_t         c_wdata_q;
  line_data_t         c_rdata_q;
  logic [LW-1:0]      c_since_q;

  idx_t            a_idx;
  tag_t            a_tag;
  logic [WAYS-1:0] a_match;
  logic [WW-1:0]   a_way;
  logic            a_hit, a_hit_ok, a_pending, a_lookup, a_do_hit;

  assign a_idx    = idx_of(c_line_q);
  assign a_tag    = tag_of(c_line_q);
  assign a_lookup = (c_state_q == C_LOOKUP);
  always_comb begin
    a_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      a_match[w] = vld_q[a_idx][w] && (tag_q[a_idx][w] == a_tag);
      if (a_match[w]) a_way = WW'(w);
    end
  end
  assign a_hit     = |a_match;
  assign a_hit_ok  = a_hit && (!c_write_q || st_q[a_idx][a_way] inside {ST_E, ST_M});
  assign a_pending = mshr_match(m_vld_q, m_line_q, c_line_q);
  assign a_do_hit  = a_lookup && a_hit_ok;

  assign core_req_ready  = (c_state_q == C_IDLE);
  assign core_resp_valid = (c_state_q == C_HOLD) && (c_since_q >= LW'(HIT_LAT));
  assign core_resp_rdata = c_rdata_q;

  logic demand_want;
  assign demand_want = a_lookup && !a_hit_ok && !a_pending && m_free_any;

  // ------------------------------------------------------- prefetch probe
  idx_t            b_idx;
  tag_t            b_tag;
  logic [WAYS-1:0] b_match;
  logic [WW-1:0]   b_way;
  logic            b_hit, b_perm, b_pending, b_throttle;
  epoch_t          b_ep [WAYS];

  assign b_idx = idx_of(pf_line);
  assign b_tag = tag_of(pf_line);
  always_comb begin
    b_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      b_match[w] = vld_q[b_idx][w] && (tag_q[b_idx][w] == b_tag);
      b_ep[w]    = ep_q[b_idx][w];
      if (b_match[w]) b_way = WW'(w);
    end
  end
  assign b_hit     = |b_match;
  assign b_perm    = b_hit && (!pf_excl || st_q[b_idx][b_way] inside {ST_E, ST_M});
  assign b_pending = mshr_match(m_vld_q, m_line_q, pf_line);

  logic [WW-1:0]   b_victim_unused;
  logic [WAYS-1:0] b_clear_unused;
  logic [2:0]      b_reason_unused;
  ecm_victim_sel #(.WAYS(WAYS)) u_probe_sel (
    .valid     (vld_q[b_idx]),
    .epoch     (b_ep),
    .ref_bit   (ref_q[b_idx]),
    .cur_epoch (cur_epoch),
    .req_epoch (pf_epoch),
    .quota_cur (quota_cur),
    .quota_next(quota_next),
    .victim    (b_victim_unused),
    .ref_clear (b_clear_unused),
    .throttle  (b_throttle),
    .reason    (b_reason_unused)
  );

  logic pf_want;
  always_comb begin
    if (b_perm)                      pf_outcome = PF_SKIP_HIT;
    else if (b_pending)              pf_outcome = PF_SKIP_PENDING;
    else if (!b_hit && b_throttle)   pf_outcome = PF_SKIP_THROTTLE;
    else                             pf_outcome = PF_ISSUED;
  end
  assign pf_want  = pf_valid && (pf_outcome == PF_ISSUED) && m_free_any;
  assign pf_ready = (pf_outcome != PF_ISSUED) ||
                    (pf_want && !wb_vld_q && !demand_want && mem_req_ready);

  // ---------------------------------------------------- directory requests
  logic mem_fire, alloc_demand, alloc_pf;
  always_comb begin
    mem_req_valid = wb_vld_q || demand_want || pf_want;
    mem_req_id    = m_free_id;
    mem_req_data  = wb_data_q;
    if (wb_vld_q) begin
      mem_req_op   = MEM_PUTX;
      mem_req_line = wb_line_q;
    end else if (demand_want) begin
      mem_req_op   = c_write_q ? MEM_GETX : MEM_GETS;
      mem_req_line = c_line_q;
    end else begin
      mem_req_op   = pf_excl ? MEM_GETX : MEM_GETS;
      mem_req_line = pf_line;
    end
  end
  assign mem_fire     = mem_req_valid && mem_req_ready;
  assign alloc_demand = mem_fire && !wb_vld_q && demand_want;
  assign alloc_pf     = mem_fire && !wb_vld_q && !demand_want && pf_want;

  // ------------------------------------------------------------------ fill
  logic [PLINE_W-1:0] f_line;
  idx_t               f_idx;
  tag_t               f_tag;
  logic [WAYS-1:0]    f_match;
  logic [WW-1:0]      f_hit_way, f_victim, f_way;
  logic               f_hit, f_fire, f_evict, f_dirty;
  logic [WAYS-1:0]    f_clear;
  logic [2:0]         f_reason_unused;
  logic               f_throttle_unused;
  epoch_t             f_ep [WAYS];

  assign f_line = m_line_q[mem_resp_id];
  assign f_idx  = idx_of(f_line);
  assign f_tag  = tag_of(f_line);
  always_comb begin
    f_hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      f_match[w] = vld_q[f_idx][w] && (tag_q[f_idx][w] == f_tag);
      f_ep[w]    = ep_q[f_idx][w];
      if (f_match[w]) f_hit_way = WW'(w);
    end
  end
  assign f_hit = |f_match;

  ecm_victim_sel #(.WAYS(WAYS)) u_fill_sel (
    .valid     (vld_q[f_idx]),
    .epoch     (f_ep),
    .ref_bit   (ref_q[f_idx]),
    .cur_epoch (cur_epoch),
    .req_epoch (m_ep_q[mem_resp_id]),
    .quota_cur (quota_cur),
    .quota_next(quota_next),
    .victim    (f_victim),
    .ref_clear (f_clear),
    .throttle  (f_throttle_unused),
    .reason    (f_reason_unused)
  );

  assign f_way   = f_hit ? f_hit_way : f_victim;
  // a fill waits while the write-back buffer is busy, or while a core hit
  // updates the same set in this cycle
  assign mem_resp_ready = !wb_vld_q && !(a_do_hit && (a_idx == f_idx));
  assign f_fire  = mem_resp_valid && mem_resp_ready;
  assign f_evict = f_fire && !f_hit && vld_q[f_idx][f_victim];
  assign f_dirty = f_evict && (st_q[f_idx][f_victim] == ST_M);

  // ------------------------------------------------- directory requests in
  idx_t            d_idx;
  tag_t            d_tag;
  logic [WAYS-1:0] d_match;
  logic [WW-1:0]   d_way;
  logic            d_hit, d_fire;

  assign d_idx = idx_of(snp_line);
  assign d_tag = tag_of(snp_line);
  always_comb begin
    d_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      d_match[w] = vld_q[d_idx][w] && (tag_q[d_idx][w] == d_tag);
      if (d_match[w]) d_way = WW'(w);
    end
  end
  assign d_hit = |d_match;
  // a request from the directory waits for a fill, for a core hit in the
  // same set, and for a buffered write-back of the same line to leave first
  assign snp_ready = !f_fire && !(a_do_hit && (a_idx == d_idx)) &&
                     !(wb_vld_q && (wb_line_q == snp_line));
  assign d_fire    = snp_valid && snp_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) snp_resp_valid <= 1'b0;
    else        snp_resp_valid <= d_fire;
  end
  always_ff @(posedge clk) begin
    if (d_fire) begin
      snp_resp_hit   <= d_hit;
      snp_resp_dirty <= d_hit && (st_q[d_idx][d_way] == ST_M);
      snp_resp_data  <= data_q[d_idx][d_way];
    end
  end

  assign evict_valid = f_evict || (d_fire && d_hit && snp_inv);
  assign evict_line  = f_evict ? {tag_q[f_idx][f_victim], f_idx} : snp_line;
  assign pf_done     = f_fire && m_pf_q[mem_resp_id];

  // ------------------------------------------------------------ state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        vld_q[s] <= '0;
        ref_q[s] <= '0;
      end
      m_vld_q   <= '0;
      wb_vld_q  <= 1'b0;
      c_state_q <= C_IDLE;
      c_since_q <= '0;
    end else begin
      // core port
      if (c_state_q != C_IDLE && c_since_q != '1) c_since_q <= c_since_q + 1'b1;
      unique case (c_state_q)
        C_IDLE: if (core_req_valid) begin
          c_state_q <= C_LOOKUP;
          c_since_q <= LW'(1);
        end
        C_LOOKUP: if (a_hit_ok) begin
          c_state_q         <= C_HOLD;
          ref_q[a_idx][a_way] <= 1'b1;
        end
        C_HOLD: if (core_resp_valid) c_state_q <= C_IDLE;
        default: c_state_q <= C_IDLE;
      endcase

      // MSHR allocation
      if (alloc_demand || alloc_pf) m_vld_q[m_free_id] <= 1'b1;

      // write-back buffer
      if (mem_fire && wb_vld_q) wb_vld_q <= 1'b0;

      // invalidation from the directory
      if (d_fire && d_hit && snp_inv) vld_q[d_idx][d_way] <= 1'b0;

      // fill (last, so it wins over the updates above)
      if (f_fire) begin
        m_vld_q[mem_resp_id] <= 1'b0;
        vld_q[f_idx][f_way]  <= 1'b1;
        ref_q[f_idx]         <= (ref_q[f_idx] & ~(f_hit ? '0 : f_clear)) |
                                (WAYS'(1) << f_way);
        if (f_dirty) wb_vld_q <= 1'b1;
      end
    end
  end

  // arrays without reset: contents only matter while the valid bit is set
  always_ff @(posedge clk) begin
    if (c_state_q == C_IDLE && core_req_valid) begin
      c_write_q <= core_req_write;
      c_line_q  <= core_req_line;
      c_wdata_q <= core_req_wdata;
    end
    if (a_do_hit) begin
      c_rdata_q            <= c_write_q ? c_wdata_q : data_q[a_idx][a_way];
      ep_q[a_idx][a_way]   <= cur_epoch;
      if (c_write_q) begin
        data_q[a_idx][a_way] <= c_wdata_q;
        st_q[a_idx][a_way]   <= ST_M;
      end
    end
    if (d_fire && d_hit && !snp_inv) st_q[d_idx][d_way] <= ST_S;
    if (pf_valid && b_perm && !is_active(ep_q[b_idx][b_way], cur_epoch))
      ep_q[b_idx][b_way] <= pf_epoch;
    if (alloc_demand || alloc_pf) begin
      m_line_q[m_free_id] <= mem_req_line;
      m_pf_q[m_free_id]   <= alloc_pf;
      m_ep_q[m_free_id]   <= alloc_pf ? pf_epoch : cur_epoch;
    end
    if (f_dirty) begin
      wb_line_q <= {tag_q[f_idx][f_victim], f_idx};
      wb_data_q <= data_q[f_idx][f_victim];
    end
    if (f_fire) begin
      tag_q[f_idx][f_way]  <= f_tag;
      st_q[f_idx][f_way]   <= mem_resp_excl ? ST_E : ST_S;
      ep_q[f_idx][f_way]   <= m_ep_q[mem_resp_id];
      data_q[f_idx][f_way] <= mem_resp_data;
    end
  end

  a_resp_known_id: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> m_vld_q[mem_resp_id]);
  a_one_alloc: assert property (@(posedge clk) disable iff (!rst_n)
    !(alloc_demand && alloc_pf));
endmodule
