// tlb_model: behavioural model (not synthesizable) of a core's second-level
// TLB as used by the bulk prefetcher: one request at a time, answered after
// 1..MAX_LAT cycles with a fixed translation ppn = xlate(vpn). Pages whose
// number is FAULT_MOD-aligned plus FAULT_REM fault (no mapping), so a
// testbench can exercise dropped lines.
module tlb_model
  import ebp_pkg::*;
#(
  parameter int MAX_LAT   = 4,
  parameter int FAULT_MOD = 0,   // 0: no faults
  parameter int FAULT_REM = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tlb_req_valid,
  output logic             tlb_req_ready,
  input  logic [VPN_W-1:0] tlb_req_vpn,
  input  logic             tlb_req_write,
  output logic             tlb_resp_valid,
  output logic [PPN_W-1:0] tlb_resp_ppn,
  output logic             tlb_resp_fault
);
  function automatic logic [PPN_W-1:0] xlate(input logic [VPN_W-1:0] v);
    return PPN_W'(v) ^ 28'h0ABC000;
  endfunction
  function automatic bit faults(input logic [VPN_W-1:0] v);
    return (FAULT_MOD != 0) && (int'(v % VPN_W'(FAULT_MOD)) == FAULT_REM);
  endfunction

  bit               busy = 0;
  int               wait_c = 0;
  logic [VPN_W-1:0] vpn_q;
  int               n_req = 0;

  assign tlb_req_ready = rst_n && !busy && !tlb_resp_valid;
  initial begin tlb_resp_valid = 0; tlb_resp_ppn = '0; tlb_resp_fault = 0; end

  always @(posedge clk) begin
    tlb_resp_valid <= 1'b0;
    if (tlb_req_valid && tlb_req_ready) begin
      busy <= 1; vpn_q <= tlb_req_vpn; wait_c <= $urandom_range(0, MAX_LAT - 1);
      n_req++;
    end else if (busy) begin
      if (wait_c == 0) begin
        busy <= 0;
        tlb_resp_valid <= 1'b1;
        tlb_resp_ppn   <= xlate(vpn_q);
        tlb_resp_fault <= faults(vpn_q);
      end else wait_c <= wait_c - 1;
    end
  end

  logic unused_write;
  assign unused_write = tlb_req_write;
endmodule
