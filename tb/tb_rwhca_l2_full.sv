// tb_rwhca_l2_full: the hybrid cache at its full default size, one complete migration cycle.
//
// The cache is instantiated with every parameter at its default (4 MB: 2048 sets, 15 MRAM
// read-region ways, 1 SRAM write-region way, 16-entry swap buffer, latencies 6 / 20 / 60)
// next to a 400-cycle memory model. The test takes one line through the whole policy --
// load miss, read-region hit, two store hits in the read region that move it into the
// write region, a write-region store hit, two load hits in the write region that move it
// back through the swap buffer, a snoop retry while it is buffered, the drain, and a final
// read-region hit -- and checks the data, the events and the hit latencies (region latency
// plus one cycle). Lines in other sets, at the top and bottom of the index range, then check
// address decoding at full width, and a store miss evicting a dirty line checks write-back.
`timescale 1ns/1ps
module tb_rwhca_l2_full;
  import rwhca_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned ADDR_W = 40, SETS = 2048;

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
  ev_t ev;
  logic [4:0] sb_count;

  rwhca_l2 dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata, .req_wmask,
    .resp_valid, .resp_rdata, .snoop_valid, .snoop_addr, .snoop_retry,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata, .ev_o(ev), .sb_count_o(sb_count)
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
  longint unsigned lat;
  always @(negedge clk) seen <= seen | ev;

  task automatic do_req(op_e op, logic [ADDR_W-1:0] a, line_t d, bmask_t m);
    longint unsigned t_acc, la;
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
  endtask

  task automatic settle();
    @(negedge clk);
    while (!req_ready) @(negedge clk);
  endtask

  function automatic logic [ADDR_W-1:0] line_addr(longint unsigned tag, int set);
    return ADDR_W'((tag << (OFFSET_W + $clog2(SETS))) | (longint'(set) << OFFSET_W));
  endfunction

  initial begin
    logic [ADDR_W-1:0] A, B, C;
    A = line_addr(64'h2A_5A5A, 1234);
    B = line_addr(64'h1F_FFFF, SETS - 1);
    C = line_addr(64'h00_0001, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    do_req(OP_LOAD, A, '0, '0);            settle();
    check(seen.miss_load, "load miss");
    do_req(OP_LOAD, A, '0, '0);            settle();
    check(seen.hit_right && lat == 21, $sformatf("read-region load hit in %0d cycles", lat));
    do_req(OP_STORE, A, rand_line(), rand_mask()); settle();
    check(seen.hit_wrong && !seen.swap && lat == 61, "first read-region store hit");
    do_req(OP_STORE, A, rand_line(), rand_mask()); settle();
    check(seen.hit_wrong && seen.swap && lat == 61, "second read-region store hit swaps");
    do_req(OP_STORE, A, rand_line(), rand_mask()); settle();
    check(seen.hit_right && lat == 7, $sformatf("write-region store hit in %0d cycles", lat));
    do_req(OP_LOAD, A, '0, '0);            settle();
    check(seen.hit_wrong && lat == 7, "first write-region load hit");
    do_req(OP_LOAD, A, '0, '0);
    while (sb_count == 0) @(negedge clk);
    check(seen.swap, "second write-region load hit swaps");
    snoop_valid = 1; snoop_addr = A;
    #0.1 check(snoop_retry, "snoop of the buffered line retries");
    snoop_valid = 0;
    while (sb_count != 0 || !req_ready) @(negedge clk);
    check(seen.drain, "buffered line drained into the read region");
    do_req(OP_LOAD, A, '0, '0);            settle();
    check(seen.hit_right && lat == 21, "read-region hit after the round trip");

    // decoding at the ends of the index range, dirty write-back in the write region
    do_req(OP_STORE, B, rand_line(), rand_mask()); settle();
    check(seen.miss_store, "store miss in the last set");
    do_req(OP_STORE, B | ADDR_W'(1) << (ADDR_W - 1), rand_line(), rand_mask()); settle();
    check(seen.miss_store && seen.writeback, "second store miss evicts the dirty line");
    check(u_mem.store.exists(longint'(B >> OFFSET_W)), "evicted line written to memory");
    do_req(OP_LOAD, B, '0, '0);            settle();
    check(seen.miss_load, "evicted line reloads from memory");
    do_req(OP_LOAD, C, '0, '0);            settle();
    do_req(OP_LOAD, C, '0, '0);            settle();
    check(seen.hit_right && lat == 21, "first set");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
