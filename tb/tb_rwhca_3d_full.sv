// tb_rwhca_3d_full: the 3D hierarchy at its full default size (4 MB hybrid L2, 32 MB PRAM
// L3, 400-cycle memory), one complete pass through each path.
//
// Steps, each checked for data and events: a load that misses in both levels; fifteen more
// loads to the same L2 set that push it out of the L2 read region; a reload that misses in
// the L2 and hits in the L3; two store hits in the L2 read region that swap the line into the
// SRAM write region; a store miss to another line of that set that evicts the dirty line from
// the one-way write region into the L3; and a reload of that line, which must come from the
// L3 with all stores merged.
`timescale 1ns/1ps
module tb_rwhca_3d_full;
  import rwhca_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned ADDR_W = 40;

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
  ev_t l2_ev;
  logic [4:0] sb_count;
  logic l3_hit, l3_miss, l3_wb;

  rwhca_3d dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata, .req_wmask,
    .resp_valid, .resp_rdata, .snoop_valid, .snoop_addr, .snoop_retry,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata, .l2_ev_o(l2_ev), .l2_sb_count_o(sb_count),
    .l3_ev_hit_o(l3_hit), .l3_ev_miss_o(l3_miss), .l3_ev_writeback_o(l3_wb)
  );

  mem_model #(.ADDR_W(ADDR_W)) u_mem (
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

  ev_t seen;
  bit  s_h3, s_m3;
  always @(negedge clk) begin
    seen <= seen | l2_ev;
    if (l3_hit) s_h3 <= 1;
    if (l3_miss) s_m3 <= 1;
  end

  task automatic do_req(op_e op, logic [ADDR_W-1:0] a, line_t d, bmask_t m);
    longint unsigned la;
    la = longint'(a >> OFFSET_W);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d; req_wmask = m;
    while (!req_ready) @(negedge clk);
    seen = '0; s_h3 = 0; s_m3 = 0;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    if (op == OP_LOAD) check(resp_rdata == ref_line(la), $sformatf("load data of line %0h", la));
    else ref_img[la] = merge_line(ref_line(la), d, m);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
  endtask

  // line k of one L2 set: same 11-bit L2 index, different higher bits
  function automatic logic [ADDR_W-1:0] way_line(int k);
    return ADDR_W'((longint'(k + 1) << (OFFSET_W + 11)) | (longint'(77) << OFFSET_W));
  endfunction

  initial begin
    logic [ADDR_W-1:0] A, D;
    A = way_line(0);
    D = way_line(40);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    do_req(OP_LOAD, A, '0, '0);
    check(seen.miss_load && s_m3, "load misses in L2 and L3");
    for (int k = 1; k <= 15; k++) do_req(OP_LOAD, way_line(k), '0, '0);
    check(seen.miss_load, "sixteenth line of the set misses in L2");
    do_req(OP_LOAD, A, '0, '0);
    check(seen.miss_load && s_h3 && !s_m3, "evicted line misses in L2, hits in L3");
    do_req(OP_STORE, A, rand_line(), rand_mask());
    check(seen.hit_wrong && !seen.swap, "store hit in L2 read region");
    do_req(OP_STORE, A, rand_line(), rand_mask());
    check(seen.hit_wrong && seen.swap, "second store hit swaps into the write region");
    do_req(OP_STORE, D, rand_line(), rand_mask());
    check(seen.miss_store && seen.writeback, "store miss evicts the dirty line to L3");
    do_req(OP_LOAD, A, '0, '0);
    check(seen.miss_load && s_h3, "dirty line returns from L3 with merged stores");
    do_req(OP_LOAD, D, '0, '0);
    check(seen.hit_wrong, "stored line served from the write region");

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
