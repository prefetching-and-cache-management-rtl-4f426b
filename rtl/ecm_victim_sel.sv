// ecm_victim_sel: the epoch-aware replacement decision of ECM for one cache
// set, on top of NRU (not-recently-used) reference bits.
//
// Each way carries a valid bit, the epoch it was last used or prefetched in,
// and an NRU reference bit. The active epochs are the current epoch E and the
// next epoch E+1; all others are old. For a line to be allocated by epoch R
// the candidates are, in order:
//   1. invalid ways;
//   2. lines of old epochs (old task data is filtered first);
//   3. if R is not active: every way (plain NRU);
//   4. the set is full of active-epoch lines. If R holds fewer ways than its
//      quota (or none at all), the other active epoch must be above its own
//      quota, so R takes a line of the other epoch; otherwise R replaces one
//      of its own lines, judged by the reference bits of R's lines only.
// Among the candidates NRU picks the lowest way whose reference bit is clear;
// if all are set it picks the lowest candidate and asks the cache to clear
// the reference bits of all candidates (ref_clear).
// throttle tells the prefetcher to skip a new line for R: the set is full of
// active-epoch lines and R already holds at least its quota.
// Purely combinational. The candidate order, quota rule and throttle rule
// follow the document; the NRU details and the handling of a non-active R
// are this design's reading.
module ecm_victim_sel
  import ebp_pkg::*;
#(
  parameter int unsigned WAYS = 8,
  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned QW  = $clog2(WAYS + 1)
) (
  input  logic [WAYS-1:0] valid,
  input  epoch_t          epoch [WAYS],
  input  logic [WAYS-1:0] ref_bit,
  input  epoch_t          cur_epoch,
  input  epoch_t          req_epoch,
  input  logic [QW-1:0]   quota_cur,
  input  logic [QW-1:0]   quota_next,
  output logic [WW-1:0]   victim,
  output logic [WAYS-1:0] ref_clear,
  output logic            throttle,
  output logic [2:0]      reason      // 0 invalid, 1 old, 2 any, 3 other, 4 own
);
  epoch_t          nxt_epoch;
  logic            req_active;
  logic [WAYS-1:0] active, old, own, other, cand, cand_unref;
  logic [QW-1:0]   n_own, q_req;
  logic            full_active;

  assign nxt_epoch  = cur_epoch + 1'b1;
  assign req_active = (req_epoch == cur_epoch) || (req_epoch == nxt_epoch);
  assign q_req      = (req_epoch == cur_epoch) ? quota_cur : quota_next;

  always_comb begin
    n_own = '0;
    for (int w = 0; w < WAYS; w++) begin
      active[w] = valid[w] && ((epoch[w] == cur_epoch) || (epoch[w] == nxt_epoch));
      old[w]    = valid[w] && !active[w];
      own[w]    = active[w] && req_active && (epoch[w] == req_epoch);
      other[w]  = active[w] && !own[w];
      n_own     = n_own + QW'(own[w]);
    end
  end

  assign full_active = (&valid) && (old == '0);
  assign throttle    = req_active && full_active && (n_own >= q_req);

  always_comb begin
    if (!(&valid)) begin
      cand = ~valid;               reason = 3'd0;
    end else if (old != '0) begin
      cand = old;                  reason = 3'd1;
    end else if (!req_active) begin
      cand = '1;                   reason = 3'd2;
    end else if ((n_own < q_req) || (n_own == '0)) begin
      cand = other;                reason = 3'd3;
    end else begin
      cand = own;                  reason = 3'd4;
    end
  end

  assign cand_unref = cand & ~ref_bit;

  always_comb begin
    victim    = '0;
    ref_clear = '0;
    if (cand_unref != '0) begin
      for (int w = WAYS - 1; w >= 0; w--)
        if (cand_unref[w]) victim = WW'(w);
    end else begin
      for (int w = WAYS - 1; w >= 0; w--)
        if (cand[w]) victim = WW'(w);
      ref_clear = cand;
    end
  end
endmodule
