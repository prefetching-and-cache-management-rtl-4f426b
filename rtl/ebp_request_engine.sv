// ebp_request_engine: the Request Engine of the Explicit Bulk Prefetcher.
// It takes prefetch commands in order from the Command FIFO and turns each
// 2D memory range (Block Number blocks of Block Size bytes, Block Stride bytes
// apart, from a virtual start Address) into cache-line aligned requests.
//
// For every line it translates the virtual address through the core's TLB
// (asking for write permission on Read-Write commands), then offers the
// physical line to the L2 prefetch port together with the command's epoch and
// the wanted permission. The L2 answers in the same cycle: issued to the
// directory, skipped because the line is present with enough permission,
// skipped because a miss to it is already outstanding, or skipped because ECM
// throttles it (set full of active-epoch lines, epoch quota used). A line whose
// translation faults is dropped. At most MAX_OUT issued prefetches may be in
// flight; pf_done returns one credit when a prefetch fill completes. Virtual
// addressing lets a range cross page boundaries.
//
// Interface: cmd_* pops the FIFO head; tlb_req/tlb_resp is a request and a
// later response (one at a time); pf_* is a valid/ready handshake whose
// outcome is valid with ready. Timing: a line takes 2 cycles when its page
// translation is already held (LINE, ISSUE), plus the TLB latency when the
// line starts a new page; a command costs one cycle to start and one per
// block to compute its line range.
// The command fields, line splitting, translation, probe-and-skip, throttle
// and the limit of 8 outstanding requests follow the document. The one-entry
// translation buffer (cleared per command), the fault handling and the
// handshakes are this design's choices.
module ebp_request_engine
  import ebp_pkg::*;
#(
  parameter int unsigned MAX_OUT = 8,
  localparam int unsigned OW     = $clog2(MAX_OUT + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // Command FIFO head
  input  logic              cmd_valid,
  input  ebp_cmd_t          cmd,
  output logic              cmd_pop,
  // TLB
  output logic              tlb_req_valid,
  input  logic              tlb_req_ready,
  output logic [VPN_W-1:0]  tlb_req_vpn,
  output logic              tlb_req_write,
  input  logic              tlb_resp_valid,
  input  logic [PPN_W-1:0]  tlb_resp_ppn,
  input  logic              tlb_resp_fault,
  // L2 prefetch port
  output logic              pf_valid,
  input  logic              pf_ready,
  output logic [PLINE_W-1:0] pf_line,
  output logic              pf_excl,
  output epoch_t            pf_epoch,
  input  pf_outcome_e       pf_outcome,
  input  logic              pf_done,
  // status
  output logic              busy,
  output logic [OW-1:0]     outstanding,
  output logic              fault_seen    // pulse: a line was dropped on a TLB fault
);
  typedef enum logic [2:0] {S_IDLE, S_BLOCK, S_LINE, S_TLB_REQ, S_TLB_WAIT, S_ISSUE} state_e;

  state_e              state_q;
  ebp_cmd_t            cmd_q;
  logic [LEN_W-1:0]    blk_left_q;
  logic [VA_W-1:0]     blk_base_q;
  logic [VLINE_W-1:0]  line_q, last_q;
  logic                xl_valid_q, xl_fault_q;
  logic [VPN_W-1:0]    xl_vpn_q;
  logic [PPN_W-1:0]    xl_ppn_q;
  logic [OW-1:0]       out_q;

  logic [VPN_W-1:0]    line_vpn;
  logic                xl_hit;
  logic                last_line, last_block;
  logic                issued, pf_fire;

  assign line_vpn   = line_q[VLINE_W-1:LPP_W];
  assign xl_hit     = xl_valid_q && (xl_vpn_q == line_vpn);
  assign last_line  = (line_q == last_q);
  assign last_block = (blk_left_q == LEN_W'(1));

  assign cmd_pop       = (state_q == S_IDLE) && cmd_valid;
  assign tlb_req_valid = (state_q == S_TLB_REQ);
  assign tlb_req_vpn   = line_vpn;
  assign tlb_req_write = (cmd_q.op == OP_READ_WRITE);

  assign pf_valid = (state_q == S_ISSUE) && (out_q < OW'(MAX_OUT));
  assign pf_line  = {xl_ppn_q, line_q[LPP_W-1:0]};
  assign pf_excl  = (cmd_q.op == OP_READ_WRITE);
  assign pf_epoch = cmd_q.epoch;
  assign pf_fire  = pf_valid && pf_ready;
  assign issued   = pf_fire && (pf_outcome == PF_ISSUED);

  logic line_done;
  assign line_done = pf_fire || fault_seen;

  assign busy        = (state_q != S_IDLE) || (out_q != '0);
  assign outstanding = out_q;
  assign fault_seen  = ((state_q == S_LINE) && xl_hit && xl_fault_q) ||
                       ((state_q == S_TLB_WAIT) && tlb_resp_valid && tlb_resp_fault);

  // Line range of the block that starts at `base`.
  function automatic logic [VLINE_W-1:0] first_line(input logic [VA_W-1:0] base);
    return base[VA_W-1:LINE_OFF_W];
  endfunction
  function automatic logic [VLINE_W-1:0] end_line(input logic [VA_W-1:0] base,
                                                  input logic [LEN_W-1:0] size);
    logic [VA_W-1:0] e;
    e = base + VA_W'(size) - 1'b1;
    return e[VA_W-1:LINE_OFF_W];
  endfunction

  // where to go after the current line: next line, next block, or done
  state_e adv_state;
  always_comb begin
    if (!last_line)       adv_state = S_LINE;
    else if (!last_block) adv_state = S_BLOCK;
    else                  adv_state = S_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      cmd_q      <= '0;
      blk_left_q <= '0;
      blk_base_q <= '0;
      line_q     <= '0;
      last_q     <= '0;
      xl_valid_q <= 1'b0;
      xl_fault_q <= 1'b0;
      xl_vpn_q   <= '0;
      xl_ppn_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          cmd_q      <= cmd;
          blk_left_q <= cmd.bnum;
          blk_base_q <= cmd.addr;
          xl_valid_q <= 1'b0;
          if (cmd.bnum != '0 && cmd.bsize != '0) state_q <= S_BLOCK;
        end
        S_BLOCK: begin
          line_q  <= first_line(blk_base_q);
          last_q  <= end_line(blk_base_q, cmd_q.bsize);
          state_q <= S_LINE;
        end
        S_LINE: begin
          if (!xl_hit)          state_q <= S_TLB_REQ;
          else if (xl_fault_q)  state_q <= adv_state;
          else                  state_q <= S_ISSUE;
        end
        S_TLB_REQ: if (tlb_req_ready) state_q <= S_TLB_WAIT;
        S_TLB_WAIT: if (tlb_resp_valid) begin
          xl_valid_q <= 1'b1;
          xl_vpn_q   <= line_vpn;
          xl_ppn_q   <= tlb_resp_ppn;
          xl_fault_q <= tlb_resp_fault;
          state_q    <= tlb_resp_fault ? adv_state : S_ISSUE;
        end
        S_ISSUE: if (pf_fire) state_q <= adv_state;
        default: state_q <= S_IDLE;
      endcase
      // leaving a line: step the line or block pointers
      if (line_done) begin
        if (!last_line) line_q <= line_q + 1'b1;
        else if (!last_block) begin
          blk_left_q <= blk_left_q - 1'b1;
          blk_base_q <= blk_base_q + VA_W'(cmd_q.stride);
        end
      end
    end
  end

  // credits for outstanding prefetches
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_q <= '0;
    else        out_q <= out_q + OW'(issued) - OW'(pf_done);
  end

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    out_q <= OW'(MAX_OUT));
  a_pf_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && $stable(pf_line));
endmodule
