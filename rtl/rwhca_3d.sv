// rwhca_3d: 3D-stacked cache hierarchy below the core: hybrid SRAM/STT-MRAM L2 plus a
// stacked PRAM L3 (the "3DRWHCA" configuration).
//
// The read-write aware hybrid L2 (rwhca_l2: 256 KB SRAM write region + 3.75 MB MRAM read
// region, 4 MB in all) sends its misses and dirty write-backs to a 32 MB PRAM L3 on a
// stacked die with the same footprint, and the L3 in turn to main memory. The dense,
// low-leakage PRAM adds a large cache level without the power-delivery and cooling cost of
// stacking several SRAM layers. Both levels run on the core clock.
//
// Interfaces: the upper-level request/response and snoop ports of the L2, the L3's memory
// port, and event pulses of both levels. Timing is that of the two levels in series: an L2
// miss that hits in the L3 adds the L3 lookup and PRAM read (40 cycles) to the L2 miss path.
// Everything beyond the capacities, technologies and latencies of the two levels (L3
// organisation and policies, interfaces) is this design's own choice.
module rwhca_3d
  import rwhca_pkg::*;
#(
  parameter int unsigned ADDR_W  = 40,
  parameter int unsigned L2_SETS = 2048,
  parameter int unsigned L3_SETS = 16384,
  parameter int unsigned L3_WAYS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  op_e               req_op,
  input  logic [ADDR_W-1:0] req_addr,
  input  line_t             req_wdata,
  input  bmask_t            req_wmask,
  output logic              resp_valid,
  output line_t             resp_rdata,
  input  logic              snoop_valid,
  input  logic [ADDR_W-1:0] snoop_addr,
  output logic              snoop_retry,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output line_t             mem_req_wdata,
  input  logic              mem_resp_valid,
  input  line_t             mem_resp_rdata,
  output ev_t               l2_ev_o,
  output logic [4:0]        l2_sb_count_o,
  output logic              l3_ev_hit_o,
  output logic              l3_ev_miss_o,
  output logic              l3_ev_writeback_o
);
  logic              l2m_valid, l2m_ready, l2m_we, l2m_resp_valid;
  logic [ADDR_W-1:0] l2m_addr;
  line_t             l2m_wdata, l2m_resp_rdata;

  rwhca_l2 #(.ADDR_W(ADDR_W), .SETS(L2_SETS)) u_l2 (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata, .req_wmask,
    .resp_valid, .resp_rdata, .snoop_valid, .snoop_addr, .snoop_retry,
    .mem_req_valid(l2m_valid), .mem_req_ready(l2m_ready), .mem_req_we(l2m_we),
    .mem_req_addr(l2m_addr), .mem_req_wdata(l2m_wdata),
    .mem_resp_valid(l2m_resp_valid), .mem_resp_rdata(l2m_resp_rdata),
    .ev_o(l2_ev_o), .sb_count_o(l2_sb_count_o)
  );

  pram_l3 #(.ADDR_W(ADDR_W), .SETS(L3_SETS), .WAYS(L3_WAYS)) u_l3 (
    .clk, .rst_n,
    .up_req_valid(l2m_valid), .up_req_ready(l2m_ready), .up_req_we(l2m_we),
    .up_req_addr(l2m_addr), .up_req_wdata(l2m_wdata),
    .up_resp_valid(l2m_resp_valid), .up_resp_rdata(l2m_resp_rdata),
    .dn_req_valid(mem_req_valid), .dn_req_ready(mem_req_ready), .dn_req_we(mem_req_we),
    .dn_req_addr(mem_req_addr), .dn_req_wdata(mem_req_wdata),
    .dn_resp_valid(mem_resp_valid), .dn_resp_rdata(mem_resp_rdata),
    .ev_hit_o(l3_ev_hit_o), .ev_miss_o(l3_ev_miss_o), .ev_writeback_o(l3_ev_writeback_o)
  );
endmodule
