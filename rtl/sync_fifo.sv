// sync_fifo: the EBP Command FIFO. A synchronous first-in first-out queue that
// holds prefetch commands between the memory-mapped registers and the
// Request Engine, so that software can post several bulk prefetches (32 in
// the default configuration) and carry on while they are served in order.
//
// Interface: push when push_valid && push_ready (push_ready = not full);
// the head is visible on pop_data while pop_valid (= not empty) and is
// removed by pop (ignored when empty). count gives the number of entries.
// Timing: a pushed entry is visible at the head the cycle after the push;
// push and pop may happen in the same cycle, also when full.
// The depth comes from the evaluated configuration; the storage as a circular
// buffer with read/write pointers is this design's choice.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_valid,
  output logic                       push_ready,
  input  T                           push_data,
  output logic                       pop_valid,
  input  logic                       pop,
  output T                           pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                          mem_q [DEPTH];
  logic [PW-1:0]             rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  logic do_push, do_pop;

  assign pop_valid  = (cnt_q != '0);
  assign push_ready = (cnt_q != DEPTH[$clog2(DEPTH+1)-1:0]) || pop;
  assign do_pop     = pop && pop_valid;
  assign do_push    = push_valid && push_ready;
  assign pop_data   = mem_q[rd_q];
  assign count      = cnt_q;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= incr(wr_q);
      if (do_pop)  rd_q <= incr(rd_q);
      case ({do_push, do_pop})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem_q[wr_q] <= push_data;
  end

  // The count never exceeds the depth.
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    cnt_q <= DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
