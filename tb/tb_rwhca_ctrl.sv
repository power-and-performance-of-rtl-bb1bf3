// tb_rwhca_ctrl: directed test of the hybrid-cache controller's allocation and migration policy.
//
// The controller is wired to the tag arrays, data arrays and swap buffer exactly as in the
// cache top, at 4 sets with 3 read-region ways, 2 write-region ways and a 2-entry swap
// buffer, with the published latencies and a 30-cycle memory model. One line is walked
// through the whole policy and every step is checked against values worked out by hand:
//   load miss (allocated in the read region), load hit in the read region (20+1 cycles),
//   store hit in the read region twice (60+1 cycles each; the second one swaps the line into
//   the write region, with nothing pushed because the write slot was empty), store hit in
//   the write region (6+1), load hit in the write region twice (6+1; the second swaps the
//   line back, pushing it into the swap buffer), a snoop that must be told to retry while
//   the line is buffered and one that must not, a back-to-back load of the same set that
//   must first drain the buffer (conflict), then loads that return the merged store data.
// A second part checks write-region LRU and dirty write-back: stores to B, C, B, E in one
// set must evict C (not B) and write C's merged data to memory, and a reload of C must
// return it.
`timescale 1ns/1ps
module tb_rwhca_ctrl;
  import rwhca_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned ADDR_W = 40, SETS = 4, RD_WAYS = 3, WR_WAYS = 2, SB_DEPTH = 2;
  localparam int unsigned SRAM_LAT = 6, NVM_RD_LAT = 20, NVM_WR_LAT = 60, MEM_LAT = 30;
  localparam int unsigned CNT_W = 2;
  localparam logic [CNT_W-1:0] CNT_INIT = '1;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic req_valid = 0, req_ready;
  op_e  req_op = OP_LOAD;
  logic [ADDR_W-1:0] req_addr = '0;
  line_t req_wdata = '0;
  bmask_t req_wmask = '0;
  logic resp_valid;
  line_t resp_rdata;
  logic snoop_valid = 0, snoop_retry;
  logic [ADDR_W-1:0] snoop_addr = '0;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [ADDR_W-1:0] mem_req_addr;
  line_t mem_req_wdata, mem_resp_rdata;
  ev_t ev_o;
  logic [$clog2(SB_DEPTH+1)-1:0] sb_count_o;

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

  mem_model #(.ADDR_W(ADDR_W), .LAT(MEM_LAT)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  line_t ref_img [longint unsigned];
  function automatic line_t ref_line(longint unsigned la);
    return ref_img.exists(la) ? ref_img[la] : init_line(la);
  endfunction

  // events seen during the last request (until the controller is idle again)
  ev_t seen;
  longint unsigned lat;
  always @(negedge clk) seen <= seen | ev_o;

  task automatic do_req(op_e op, logic [ADDR_W-1:0] a, line_t d, bmask_t m, bit wait_idle = 1);
    longint unsigned t_acc;
    longint unsigned la;
    la = longint'(a >> OFFSET_W);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d; req_wmask = m;
    while (!req_ready) @(negedge clk);
    seen = '0;
    t_acc = cyc;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat = cyc - t_acc;
    if (op == OP_LOAD) check(resp_rdata == ref_line(la), $sformatf("load data of line %0h", la));
    else ref_img[la] = merge_line(ref_line(la), d, m);
    if (wait_idle) begin
      @(negedge clk);
      while (!req_ready) @(negedge clk);
    end
  endtask

  function automatic logic [ADDR_W-1:0] line_addr(int tag, int set);
    return ADDR_W'((longint'(tag) << (OFFSET_W + $clog2(SETS))) | (longint'(set) << OFFSET_W));
  endfunction

  initial begin
    logic [ADDR_W-1:0] A, B, C, E;
    bit got_retry, got_other;
    A = line_addr(1, 0); B = line_addr(2, 1); C = line_addr(3, 1); E = line_addr(4, 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    do_req(OP_LOAD, A, '0, '0);
    check(seen.miss_load && !seen.hit_right && !seen.hit_wrong, "1: load miss");
    do_req(OP_LOAD, A, '0, '0);
    check(seen.hit_right && lat == NVM_RD_LAT + 1, $sformatf("2: load hit in read region, %0d cycles", lat));
    do_req(OP_STORE, A, rand_line(), {64'h0, {64{1'b1}}});
    check(seen.hit_wrong && !seen.swap && lat == NVM_WR_LAT + 1, $sformatf("3: store hit in read region, no swap, %0d cycles", lat));
    do_req(OP_STORE, A, rand_line(), {{32{1'b1}}, 96'h0});
    check(seen.hit_wrong && seen.swap && lat == NVM_WR_LAT + 1, "4: second store hit in read region swaps");
    check(sb_count_o == 0, "4: empty write slot, nothing buffered");
    check(u_wr_tags.valid_q[0] != '0, "4: line now valid in the write region");
    do_req(OP_STORE, A, rand_line(), rand_mask());
    check(seen.hit_right && lat == SRAM_LAT + 1, $sformatf("5: store hit in write region, %0d cycles", lat));
    do_req(OP_LOAD, A, '0, '0);
    check(seen.hit_wrong && !seen.swap && lat == SRAM_LAT + 1, "6: load hit in write region");
    // second wrong load: swap with a push; probe snoops while the line is buffered
    req_valid = 1; req_op = OP_LOAD; req_addr = A;
    while (!req_ready) @(negedge clk);
    seen = '0;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    check(resp_rdata == ref_line(longint'(A >> OFFSET_W)), "7: load data");
    while (sb_count_o == 0) @(negedge clk);
    check(seen.hit_wrong && seen.swap, "7: second load hit in write region swaps");
    snoop_valid = 1; snoop_addr = A | 40'h15;
    #0.1 got_retry = snoop_retry;
    snoop_addr = B;
    #0.1 got_other = snoop_retry;
    snoop_valid = 0;
    check(got_retry, "7: snoop of the buffered line retries");
    check(!got_other, "7: snoop of another line does not retry");
    // back-to-back load to the same set: must drain first
    do_req(OP_LOAD, A, '0, '0);
    check(seen.conflict && seen.drain && seen.hit_right, "8: conflict, drain, then read-region hit");
    check(sb_count_o == 0, "8: buffer drained");
    do_req(OP_LOAD, A, '0, '0);
    check(seen.hit_right && lat == NVM_RD_LAT + 1, "9: read-region hit after drain");

    // write-region LRU and write-back
    do_req(OP_STORE, B, rand_line(), rand_mask());
    check(seen.miss_store, "10: store miss B");
    do_req(OP_STORE, C, rand_line(), rand_mask());
    check(seen.miss_store && !seen.writeback, "11: store miss C into the second way");
    do_req(OP_STORE, B, rand_line(), rand_mask());
    check(seen.hit_right, "12: store hit B");
    do_req(OP_STORE, E, rand_line(), rand_mask());
    check(seen.miss_store && seen.writeback, "13: store miss E writes back a victim");
    check(u_mem.store.exists(longint'(C >> OFFSET_W)) && !u_mem.store.exists(longint'(B >> OFFSET_W)),
          "13: LRU victim is C, not B");
    check(u_mem.peek(longint'(C >> OFFSET_W)) == ref_line(longint'(C >> OFFSET_W)), "13: written-back data of C");
    do_req(OP_LOAD, C, '0, '0);
    check(seen.miss_load, "14: reload of C misses and returns its data");
    do_req(OP_LOAD, B, '0, '0);
    check(seen.hit_wrong, "15: B still in the write region");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
