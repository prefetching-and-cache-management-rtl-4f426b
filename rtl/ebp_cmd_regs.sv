// ebp_cmd_regs: the memory-mapped command registers of the Explicit Bulk
// Prefetcher. Software writes Address, Block Size, Block Number, Block Stride
// and Epoch, then writes Opcode; the Opcode write atomically enqueues all six
// fields as one command into the Command FIFO. The field registers keep their
// values, so a following command only rewrites the fields that change.
//
// Interface: a simple 64-bit register bus (sel, write, 8-bit byte offset,
// wdata, ready, rdata). Accesses complete in the cycle they are presented
// with ready high; rdata is valid in that cycle. An Opcode write while the
// Command FIFO is full is held (ready low) until an entry frees, so no command
// is lost. Reads return the field registers; STATUS returns the FIFO depth in
// bits [7:0] and the Request Engine's busy flag in bit 8.
// The register set and the enqueue-on-Opcode rule follow the document; the
// offsets, widths, the stall on a full FIFO and STATUS are this design's own.
module ebp_cmd_regs
  import ebp_pkg::*;
#(
  parameter int unsigned CNT_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // register bus
  input  logic             sel,
  input  logic             write,
  input  logic [7:0]       addr,
  input  logic [63:0]      wdata,
  output logic             ready,
  output logic [63:0]      rdata,
  // Command FIFO push side
  output logic             cmd_valid,
  input  logic             cmd_ready,
  output ebp_cmd_t         cmd,
  // status inputs
  input  logic [CNT_W-1:0] fifo_count,
  input  logic             engine_busy
);
  logic [VA_W-1:0]         addr_q;
  logic [LEN_W-1:0]        bsize_q, bnum_q;
  logic signed [LEN_W-1:0] stride_q;
  epoch_t                  epoch_q;

  logic is_opcode_wr;
  assign is_opcode_wr = sel && write && (addr == REG_EBP_OPCODE);

  assign cmd_valid = is_opcode_wr;
  assign cmd = '{addr: addr_q, bsize: bsize_q, bnum: bnum_q, stride: stride_q,
                 epoch: epoch_q, op: ebp_op_e'(wdata[0])};
  assign ready = !is_opcode_wr || cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q   <= '0;
      bsize_q  <= '0;
      bnum_q   <= '0;
      stride_q <= '0;
      epoch_q  <= '0;
    end else if (sel && write) begin
      unique case (addr)
        REG_EBP_ADDR:   addr_q   <= wdata[VA_W-1:0];
        REG_EBP_BSIZE:  bsize_q  <= wdata[LEN_W-1:0];
        REG_EBP_BNUM:   bnum_q   <= wdata[LEN_W-1:0];
        REG_EBP_STRIDE: stride_q <= wdata[LEN_W-1:0];
        REG_EBP_EPOCH:  epoch_q  <= wdata[EPOCH_W-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr)
      REG_EBP_ADDR:   rdata = 64'(addr_q);
      REG_EBP_BSIZE:  rdata = 64'(bsize_q);
      REG_EBP_BNUM:   rdata = 64'(bnum_q);
      REG_EBP_STRIDE: rdata = 64'(signed'(stride_q));
      REG_EBP_EPOCH:  rdata = 64'(epoch_q);
      REG_EBP_STATUS: rdata = {55'd0, engine_busy, 8'(fifo_count)};
      default:        rdata = '0;
    endcase
  end
endmodule
