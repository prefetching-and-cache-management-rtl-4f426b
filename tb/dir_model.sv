// dir_model: behavioural model (not synthesizable) of the coherence
// directory and main memory seen by one private L2. It accepts GETS/GETX/
// PUTX requests (random back-pressure), answers each GET after a random
// latency of LAT_MIN..LAT_MAX cycles, possibly out of order, with the line's
// data and an exclusive grant (always for GETX, at random for GETS, as a
// MESI directory grants E when there are no sharers). PUTX stores the line.
// A line never written holds init_data(line), a fixed function of its
// address that testbenches can compute on their own.
// With SNP_PERMILLE > 0 it also sends, at that rate per cycle, an invalidate
// or a downgrade for one of the last 64 lines it granted, one at a time, and
// stores the data of a dirty answer, as a directory recalling a line would.
module dir_model
  import ebp_pkg::*;
#(
  parameter int IDW     = 4,
  parameter int LAT_MIN = 10,
  parameter int LAT_MAX = 60,
  parameter int SNP_PERMILLE = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mem_req_valid,
  output logic               mem_req_ready,
  input  mem_op_e            mem_req_op,
  input  logic [PLINE_W-1:0] mem_req_line,
  input  logic [IDW-1:0]     mem_req_id,
  input  line_data_t         mem_req_data,
  output logic               mem_resp_valid,
  input  logic               mem_resp_ready,
  output logic [IDW-1:0]     mem_resp_id,
  output logic               mem_resp_excl,
  output line_data_t         mem_resp_data,
  output logic               snp_valid,
  input  logic               snp_ready,
  output logic [PLINE_W-1:0] snp_line,
  output logic               snp_inv,
  input  logic               snp_resp_valid,
  input  logic               snp_resp_hit,
  input  logic               snp_resp_dirty,
  input  line_data_t         snp_resp_data
);
  typedef struct { logic [IDW-1:0] id; logic [PLINE_W-1:0] line; bit excl; longint due; } pend_t;
  pend_t        pend[$];
  line_data_t   mem [logic [PLINE_W-1:0]];
  longint       cyc = 0;
  int           n_gets = 0, n_getx = 0, n_putx = 0;
  int           e_pct = 50;   // chance of an exclusive grant to a GETS
  int           n_inv = 0, n_dgr = 0, n_snp_hit = 0, n_snp_dirty = 0;
  logic [PLINE_W-1:0] granted[$];
  bit           snp_wait = 0;
  int           snp_rate = SNP_PERMILLE;   // may be changed while running

  function automatic line_data_t init_data(input logic [PLINE_W-1:0] l);
    line_data_t d;
    for (int i = 0; i < 16; i++) d[i*32 +: 32] = 32'(l) * 32'h9E3779B1 + 32'(i);
    return d;
  endfunction

  function automatic line_data_t read_line(input logic [PLINE_W-1:0] l);
    return mem.exists(l) ? mem[l] : init_data(l);
  endfunction

  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_id = '0; mem_resp_excl = 0;
    mem_resp_data = '0; snp_valid = 0; snp_line = '0; snp_inv = 0;
  end

  // recalls
  always @(posedge clk) if (rst_n) begin
    if (snp_valid && snp_ready) begin
      snp_valid <= 1'b0;
      if (snp_inv) n_inv++; else n_dgr++;
    end
    if (snp_resp_valid) begin
      snp_wait = 0;
      if (snp_resp_hit) n_snp_hit++;
      if (snp_resp_dirty) begin
        mem[snp_line] = snp_resp_data;
        n_snp_dirty++;
      end
    end
    if (!snp_valid && !snp_wait && granted.size() > 0 &&
        int'($urandom_range(0, 999)) < snp_rate) begin
      snp_valid <= 1'b1;
      snp_wait   = 1;
      snp_line  <= granted[$urandom_range(0, granted.size() - 1)];
      snp_inv   <= $urandom_range(0, 1) == 1;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (mem_resp_valid && mem_resp_ready) mem_resp_valid <= 1'b0;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_op == MEM_PUTX) begin
          mem[mem_req_line] = mem_req_data;
          n_putx++;
        end else begin
          bit e;
          e = (mem_req_op == MEM_GETX) || (int'($urandom_range(0, 99)) < e_pct);
          if (mem_req_op == MEM_GETX) n_getx++; else n_gets++;
          granted.push_back(mem_req_line);
          if (granted.size() > 64) void'(granted.pop_front());
          pend.push_back('{id: mem_req_id, line: mem_req_line, excl: e,
                           due: cyc + longint'($urandom_range(LAT_MIN, LAT_MAX))});
        end
      end
      if (!mem_resp_valid || mem_resp_ready) begin
        int pick;
        pick = -1;
        foreach (pend[i]) if (pick < 0 && pend[i].due <= cyc) pick = i;
        if (pick >= 0) begin
          mem_resp_valid <= 1'b1;
          mem_resp_id    <= pend[pick].id;
          mem_resp_excl  <= pend[pick].excl;
          mem_resp_data  <= read_line(pend[pick].line);
          pend.delete(pick);
        end
      end
    end
    mem_req_ready <= ($urandom_range(0, 4) != 0);
  end
endmodule
