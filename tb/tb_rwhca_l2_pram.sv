// tb_rwhca_l2_pram: the hybrid L2 in its SRAM-PRAM configuration.
//
// The same cache is built as an SRAM write region of one way plus a 63-way PRAM read region
// (64-way in all; 16 MB at 2048 sets, here 4 sets to keep the run short), with the PRAM
// latencies read 40 / write 200. One line is taken through load miss, read-region load hit
// (41 cycles), two read-region store hits (201 cycles each, the second swapping the line to
// SRAM), an SRAM store hit (7 cycles) and a final load; then 70 further lines in the same set
// fill all 63 PRAM ways, after which the first of them must have been evicted (LRU) and
// reloading it must miss and return its data.
// The way split and the latencies are the published SRAM-PRAM configuration; the 4-set size,
// the 40-cycle memory model and the access sequence are this test's own choices. Every
// response is compared with a reference image of memory, and every hit latency is exact.
`timescale 1ns/1ps
module tb_rwhca_l2_pram;
  import rwhca_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned ADDR_W = 40, SETS = 4;

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
  logic snoop_retry;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [ADDR_W-1:0] mem_req_addr;
  line_t mem_req_wdata, mem_resp_rdata;
  ev_t ev;
  logic [4:0] sb_count;

  rwhca_l2 #(.ADDR_W(ADDR_W), .SETS(SETS), .RD_WAYS(63), .WR_WAYS(1),
             .NVM_RD_LAT(40), .NVM_WR_LAT(200)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata, .req_wmask,
    .resp_valid, .resp_rdata, .snoop_valid(1'b0), .snoop_addr('0), .snoop_retry,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata, .ev_o(ev), .sb_count_o(sb_count)
  );

  mem_model #(.ADDR_W(ADDR_W), .LAT(40)) u_mem (
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
    la = longint'(a) >> OFFSET_W;
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
    @(negedge clk);
    while (!req_ready) @(negedge clk);
  endtask

  function automatic logic [ADDR_W-1:0] line_addr(int tag, int set);
    return ADDR_W'((longint'(tag) << (OFFSET_W + $clog2(SETS))) | (longint'(set) << OFFSET_W));
  endfunction

  initial begin
    logic [ADDR_W-1:0] A;
    A = line_addr(1, 2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    do_req(OP_LOAD, A, '0, '0);
    check(seen.miss_load, "load miss");
    do_req(OP_LOAD, A, '0, '0);
    check(seen.hit_right && lat == 41, $sformatf("PRAM load hit in %0d cycles", lat));
    do_req(OP_STORE, A, rand_line(), rand_mask());
    check(seen.hit_wrong && !seen.swap && lat == 201, $sformatf("PRAM store hit in %0d cycles", lat));
    do_req(OP_STORE, A, rand_line(), rand_mask());
    check(seen.hit_wrong && seen.swap && lat == 201, "second PRAM store hit swaps");
    do_req(OP_STORE, A, rand_line(), rand_mask());
    check(seen.hit_right && lat == 7, $sformatf("SRAM store hit in %0d cycles", lat));
    do_req(OP_LOAD, A, '0, '0);
    check(seen.hit_wrong && lat == 7, "load of the line now in SRAM");
    for (int k = 0; k < 70; k++) do_req(OP_LOAD, line_addr(100 + k, 2), '0, '0);
    do_req(OP_LOAD, line_addr(100, 2), '0, '0);
    check(seen.miss_load, "oldest of 70 lines evicted from 63 PRAM ways");
    do_req(OP_LOAD, line_addr(169, 2), '0, '0);
    check(seen.hit_right && lat == 41, "most recent line still present");
    repeat (300) @(negedge clk);
    check(sb_count == 0 && !snoop_retry, "swap buffer drained while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
