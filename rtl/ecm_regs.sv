// ecm_regs: the memory-mapped state of Epoch-based Cache Management: the
// current-epoch register and the quota registers of the two active epochs
// (current = E, next = E+1 modulo 2^EPOCH_W).
//
// Software advances the epoch at each task boundary (write to ADV) or sets it
// directly (write to EPOCH); the epoch wraps around with no special handling.
// A quota is written in bytes and converted at once to a number of ways,
// rounded up to whole ways of WAY_BYTES = CACHE_BYTES/WAYS bytes each. The sum
// of the two quotas never exceeds WAYS: a quota that would over-book the
// cache is cut to the ways the other active epoch leaves free. On an advance
// the next epoch's quota becomes the current epoch's quota and the new next
// epoch starts with quota 0 until software assigns one.
// Interface: same 64-bit register bus as the EBP registers; every access
// completes in its cycle. Reading a quota register returns its value in ways.
// Timing: a new epoch or quota is seen by the cache the cycle after the write.
// The epoch register, byte quotas, round-up and the over-booking limit follow
// the document; the hand-over of the next quota on an advance and the cut of
// the written quota are this design's choices.
module ecm_regs
  import ebp_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 262144,
  parameter int unsigned WAYS        = 8,
  localparam int unsigned QW         = $clog2(WAYS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel,
  input  logic          write,
  input  logic [7:0]    addr,
  input  logic [63:0]   wdata,
  output logic          ready,
  output logic [63:0]   rdata,
  output epoch_t        cur_epoch,
  output logic [QW-1:0] quota_cur,   // ways
  output logic [QW-1:0] quota_next   // ways
);
  localparam int unsigned WAY_BYTES = CACHE_BYTES / WAYS;
  localparam int unsigned WB_SH     = $clog2(WAY_BYTES);

  epoch_t        epoch_q;
  logic [QW-1:0] qcur_q, qnext_q;

  // bytes -> ways, rounded up and limited to `avail` ways
  function automatic logic [QW-1:0] to_ways(input logic [63:0] bytes,
                                            input logic [QW-1:0] avail);
    logic [64:0] w;
    w = ({1'b0, bytes} + 65'(WAY_BYTES - 1)) >> WB_SH;
    return (w > 65'(avail)) ? avail : QW'(w);
  endfunction

  assign ready      = 1'b1;
  assign cur_epoch  = epoch_q;
  assign quota_cur  = qcur_q;
  assign quota_next = qnext_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      epoch_q <= '0;
      qcur_q  <= '0;
      qnext_q <= '0;
    end else if (sel && write) begin
      unique case (addr)
        REG_ECM_EPOCH: epoch_q <= wdata[EPOCH_W-1:0];
        REG_ECM_ADV: begin
          epoch_q <= epoch_q + 1'b1;
          qcur_q  <= qnext_q;
          qnext_q <= '0;
        end
        REG_ECM_QCUR:  qcur_q  <= to_ways(wdata, QW'(WAYS) - qnext_q);
        REG_ECM_QNEXT: qnext_q <= to_ways(wdata, QW'(WAYS) - qcur_q);
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      REG_ECM_EPOCH: rdata = 64'(epoch_q);
      REG_ECM_QCUR:  rdata = 64'(qcur_q);
      REG_ECM_QNEXT: rdata = 64'(qnext_q);
      default:       rdata = '0;
    endcase
  end

  a_no_overbook: assert property (@(posedge clk) disable iff (!rst_n)
    (32'(qcur_q) + 32'(qnext_q)) <= WAYS);
endmodule
