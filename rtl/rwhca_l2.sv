// rwhca_l2: read-write aware hybrid L2 cache, SRAM write region + STT-MRAM read region.
//
// One cache level is split into two mutually exclusive regions of different memory
// technologies: a small SRAM region that is fast to write and a large STT-MRAM region that
// is dense, leaks little and reads reasonably fast but writes slowly. Loads that miss are
// placed in the read region, stores that miss in the write region, and a per-line 2-bit
// saturating counter moves a line to the other region after consecutive hits of the
// "wrong" kind (see rwhca_ctrl). Each region has its own tag/status array and data array;
// both look up the same set index, so a swap exchanges two lines of the same set. The swap
// buffer holds lines on their way into the slow read region.
//
// Default organisation: 128-byte lines, 2048 sets, 16 ways of which 1 way (256 KB) is the
// SRAM write region and 15 ways (3.75 MB) are the MRAM read region, 4 MB in all, one bank
// per way, one read/write port per region. Latencies in core cycles: SRAM 6, MRAM read 20,
// MRAM write 60. Swap buffer: 16 entries. Addresses are ADDR_W-bit byte addresses (40 bits
// by default, this design's choice); requests always move whole lines, stores with a byte
// mask. The write-back, write-allocate policy and the interfaces are this design's own.
//
// Interfaces: upper level req_valid/req_ready (+op, address, store data and mask) and a
// resp_valid pulse with the loaded line; memory requests valid/ready with a resp_valid pulse
// for reads; a snoop address that returns snoop_retry in the same cycle when the line sits in
// the swap buffer; ev_o pulses per mechanism for statistics; sb_count_o is the buffer fill.
module rwhca_l2
  import rwhca_pkg::*;
#(
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned SETS      = 2048,
  parameter int unsigned RD_WAYS   = 15,
  parameter int unsigned WR_WAYS   = 1,
  parameter int unsigned SRAM_LAT  = 6,
  parameter int unsigned NVM_RD_LAT = 20,
  parameter int unsigned NVM_WR_LAT = 60,
  parameter int unsigned CNT_W     = 2,
  parameter logic [CNT_W-1:0] CNT_INIT = '1,
  parameter int unsigned SB_DEPTH  = 16
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
  output ev_t               ev_o,
  output logic [$clog2(SB_DEPTH+1)-1:0] sb_count_o
);
  localparam int unsigned SET_W   = $clog2(SETS);
  localparam int unsigned TAG_W   = ADDR_W - OFFSET_W - SET_W;
  localparam int unsigned LADDR_W = ADDR_W - OFFSET_W;
  localparam int unsigned RW_W    = (RD_WAYS > 1) ? $clog2(RD_WAYS) : 1;
  localparam int unsigned WW_W    = (WR_WAYS > 1) ? $clog2(WR_WAYS) : 1;

  logic [SET_W-1:0] lk_set;
  logic [TAG_W-1:0] lk_tag;

  // read-region tag array
  logic rt_hit, rt_dirty, rt_vic_valid, rt_vic_dirty;
  logic [RW_W-1:0] rt_way, rt_vic_way, rt_upd_way;
  logic [CNT_W-1:0] rt_cnt, rt_upd_cnt;
  logic [TAG_W-1:0] rt_vic_tag, rt_upd_tag;
  logic rt_upd_en, rt_upd_valid, rt_upd_dirty;
  // write-region tag array
  logic wt_hit, wt_dirty, wt_vic_valid, wt_vic_dirty;
  logic [WW_W-1:0] wt_way, wt_vic_way, wt_upd_way;
  logic [CNT_W-1:0] wt_cnt, wt_upd_cnt;
  logic [TAG_W-1:0] wt_vic_tag, wt_upd_tag;
  logic wt_upd_en, wt_upd_valid, wt_upd_dirty;
  // data arrays
  logic rd_req_valid, rd_req_ready, rd_req_we, rd_done;
  logic [SET_W-1:0] rd_req_set;
  logic [RW_W-1:0] rd_req_way;
  line_t rd_req_wdata, rd_rdata;
  bmask_t rd_req_wmask;
  logic wd_req_valid, wd_req_ready, wd_req_we, wd_done;
  logic [SET_W-1:0] wd_req_set;
  logic [WW_W-1:0] wd_req_way;
  line_t wd_req_wdata, wd_rdata;
  bmask_t wd_req_wmask;
  // swap buffer
  logic sb_push, sb_full, sb_empty, sb_pop, sb_snoop_hit, sb_chk_hit;
  logic [LADDR_W-1:0] sb_push_laddr, sb_snoop_laddr;
  logic [SET_W-1:0] sb_push_set, sb_head_set, sb_chk_set;
  logic [RW_W-1:0] sb_push_way, sb_head_way;
  line_t sb_push_data, sb_head_data;

  rwhca_ctrl #(
    .ADDR_W(ADDR_W), .SETS(SETS), .RD_WAYS(RD_WAYS), .WR_WAYS(WR_WAYS),
    .CNT_W(CNT_W), .CNT_INIT(CNT_INIT)
  ) u_ctrl (.*);

  tag_status_array #(.SETS(SETS), .WAYS(RD_WAYS), .TAG_W(TAG_W), .CNT_W(CNT_W)) u_rd_tags (
    .clk, .rst_n, .lk_set, .lk_tag,
    .lk_hit(rt_hit), .lk_way(rt_way), .lk_dirty(rt_dirty), .lk_cnt(rt_cnt),
    .vic_way(rt_vic_way), .vic_valid(rt_vic_valid), .vic_dirty(rt_vic_dirty),
    .vic_tag(rt_vic_tag),
    .upd_en(rt_upd_en), .upd_set(lk_set), .upd_way(rt_upd_way), .upd_valid(rt_upd_valid),
    .upd_dirty(rt_upd_dirty), .upd_tag(rt_upd_tag), .upd_cnt(rt_upd_cnt)
  );

  tag_status_array #(.SETS(SETS), .WAYS(WR_WAYS), .TAG_W(TAG_W), .CNT_W(CNT_W)) u_wr_tags (
    .clk, .rst_n, .lk_set, .lk_tag,
    .lk_hit(wt_hit), .lk_way(wt_way), .lk_dirty(wt_dirty), .lk_cnt(wt_cnt),
    .vic_way(wt_vic_way), .vic_valid(wt_vic_valid), .vic_dirty(wt_vic_dirty),
    .vic_tag(wt_vic_tag),
    .upd_en(wt_upd_en), .upd_set(lk_set), .upd_way(wt_upd_way), .upd_valid(wt_upd_valid),
    .upd_dirty(wt_upd_dirty), .upd_tag(wt_upd_tag), .upd_cnt(wt_upd_cnt)
  );

  region_data_array #(.SETS(SETS), .WAYS(RD_WAYS), .RD_LAT(NVM_RD_LAT), .WR_LAT(NVM_WR_LAT))
  u_rd_data (
    .clk, .rst_n, .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_we(rd_req_we),
    .req_set(rd_req_set), .req_way(rd_req_way), .req_wdata(rd_req_wdata),
    .req_wmask(rd_req_wmask), .done_o(rd_done), .rdata_o(rd_rdata)
  );

  region_data_array #(.SETS(SETS), .WAYS(WR_WAYS), .RD_LAT(SRAM_LAT), .WR_LAT(SRAM_LAT))
  u_wr_data (
    .clk, .rst_n, .req_valid(wd_req_valid), .req_ready(wd_req_ready), .req_we(wd_req_we),
    .req_set(wd_req_set), .req_way(wd_req_way), .req_wdata(wd_req_wdata),
    .req_wmask(wd_req_wmask), .done_o(wd_done), .rdata_o(wd_rdata)
  );

  swap_buffer #(.DEPTH(SB_DEPTH), .LADDR_W(LADDR_W), .SET_W(SET_W), .WAY_W(RW_W)) u_sb (
    .clk, .rst_n,
    .push_valid(sb_push), .push_laddr(sb_push_laddr), .push_set(sb_push_set),
    .push_way(sb_push_way), .push_data(sb_push_data),
    .full_o(sb_full), .empty_o(sb_empty), .count_o(sb_count_o),
    .pop(sb_pop), .head_set(sb_head_set), .head_way(sb_head_way), .head_data(sb_head_data),
    .snoop_laddr(sb_snoop_laddr), .snoop_hit(sb_snoop_hit),
    .chk_set(sb_chk_set), .chk_hit(sb_chk_hit)
  );
endmodule
