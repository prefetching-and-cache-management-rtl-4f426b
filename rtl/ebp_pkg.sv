// ebp_pkg: types and constants shared by the Explicit Bulk Prefetcher (EBP),
// the Epoch-based Cache Management (ECM) logic and the private L2 cache they
// work on.
//
// Sizes follow the evaluated system: 64-byte cache lines, 3 epoch bits per L2
// tag (8 epochs), 256 KB 8-way L2, 32-entry command FIFO, 8 outstanding
// prefetches, 16 MSHRs. Address widths, the 4 KB page, the register map and
// the encodings below are this design's own choices.
package ebp_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned VA_W       = 48;   // virtual address bits
  localparam int unsigned PA_W       = 40;   // physical address bits
  localparam int unsigned LINE_OFF_W = 6;    // 64-byte cache lines
  localparam int unsigned LINE_BITS  = 512;  // one cache line of data
  localparam int unsigned PAGE_OFF_W = 12;   // 4 KB pages
  localparam int unsigned EPOCH_W    = 3;    // 8 epochs
  localparam int unsigned LEN_W      = 32;   // block size / number / stride

  localparam int unsigned VLINE_W = VA_W - LINE_OFF_W;   // virtual line number
  localparam int unsigned PLINE_W = PA_W - LINE_OFF_W;   // physical line number
  localparam int unsigned VPN_W   = VA_W - PAGE_OFF_W;
  localparam int unsigned PPN_W   = PA_W - PAGE_OFF_W;
  localparam int unsigned LPP_W   = PAGE_OFF_W - LINE_OFF_W; // line-in-page bits

  typedef logic [EPOCH_W-1:0] epoch_t;
  typedef logic [LINE_BITS-1:0] line_data_t;

  // ----------------------------------------------------------- EBP command
  // Opcode register: bit 0 selects the coherence permission requested.
  typedef enum logic [0:0] {
    OP_READ_ONLY  = 1'b0,   // lines fetched in Shared state
    OP_READ_WRITE = 1'b1    // lines fetched in Exclusive state
  } ebp_op_e;

  typedef struct packed {
    logic [VA_W-1:0]         addr;    // start virtual address
    logic [LEN_W-1:0]        bsize;   // bytes per block
    logic [LEN_W-1:0]        bnum;    // number of blocks
    logic signed [LEN_W-1:0] stride;  // bytes from one block start to the next
    epoch_t                  epoch;   // epoch the prefetched lines belong to
    ebp_op_e                 op;
  } ebp_cmd_t;

  // What the L2 did with one cache-line prefetch request.
  typedef enum logic [1:0] {
    PF_ISSUED        = 2'd0,  // miss: sent to the directory
    PF_SKIP_HIT      = 2'd1,  // present with sufficient permission
    PF_SKIP_THROTTLE = 2'd2,  // ECM: set full of active-epoch lines, quota used
    PF_SKIP_PENDING  = 2'd3   // a miss to this line is already outstanding
  } pf_outcome_e;

  // ----------------------------------------------------------- L2 / memory
  typedef enum logic [1:0] {ST_I = 2'd0, ST_S = 2'd1, ST_E = 2'd2, ST_M = 2'd3} mesi_e;

  typedef enum logic [1:0] {
    MEM_GETS = 2'd0,   // read, Shared permission
    MEM_GETX = 2'd1,   // read or upgrade, Exclusive permission
    MEM_PUTX = 2'd2    // write back a dirty line
  } mem_op_e;

  // ------------------------------------------------------ register map
  // 64-bit registers at byte offsets of an 8-bit local address.
  localparam logic [7:0] REG_EBP_ADDR   = 8'h00;
  localparam logic [7:0] REG_EBP_BSIZE  = 8'h08;
  localparam logic [7:0] REG_EBP_BNUM   = 8'h10;
  localparam logic [7:0] REG_EBP_STRIDE = 8'h18;
  localparam logic [7:0] REG_EBP_EPOCH  = 8'h20;
  localparam logic [7:0] REG_EBP_OPCODE = 8'h28;  // write: enqueue command
  localparam logic [7:0] REG_EBP_STATUS = 8'h30;  // read: queue depth, busy
  localparam logic [7:0] REG_ECM_EPOCH  = 8'h40;  // current epoch
  localparam logic [7:0] REG_ECM_ADV    = 8'h48;  // write: advance epoch
  localparam logic [7:0] REG_ECM_QCUR   = 8'h50;  // quota of current epoch (bytes)
  localparam logic [7:0] REG_ECM_QNEXT  = 8'h58;  // quota of next epoch (bytes)

endpackage
