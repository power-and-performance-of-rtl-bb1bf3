// tb_rwhca_3d: end-to-end random test of the 3D hierarchy (hybrid L2 + PRAM L3 + memory).
//
// Reduced sizes: L2 with 8 sets (3 MRAM ways + 1 SRAM way, 32 lines), L3 with 16 sets x
// 4 ways (64 lines), a 100-cycle memory. Random loads and partial-line stores over 128
// lines, with phases that favour loads or stores and phases with idle gaps, run against a
// reference image; every load must return the merged data of all earlier stores. Snoops
// run alongside. The run counts, and fails if any never happens: L2 right- and wrong-region
// hits, load and store misses, swaps, swap-buffer drains, L2 write-backs, L3 hits, L3 misses,
// L3 write-backs to memory and snoop retries.
`timescale 1ns/1ps
module tb_rwhca_3d;
  import rwhca_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned ADDR_W = 40, L2_SETS = 8, L3_SETS = 16, L3_WAYS = 4;
  localparam int unsigned NREQ = 3000, POOL = 128;

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

  rwhca_3d #(.ADDR_W(ADDR_W), .L2_SETS(L2_SETS), .L3_SETS(L3_SETS), .L3_WAYS(L3_WAYS)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata, .req_wmask,
    .resp_valid, .resp_rdata, .snoop_valid, .snoop_addr, .snoop_retry,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata, .l2_ev_o(l2_ev), .l2_sb_count_o(sb_count),
    .l3_ev_hit_o(l3_hit), .l3_ev_miss_o(l3_miss), .l3_ev_writeback_o(l3_wb)
  );

  mem_model #(.ADDR_W(ADDR_W), .LAT(100)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  line_t ref_img [longint unsigned];
  function automatic line_t ref_line(longint unsigned la);
    return ref_img.exists(la) ? ref_img[la] : init_line(la);
  endfunction

  int n_right, n_wrong, n_mld, n_mst, n_swap, n_drain, n_wb2, n_h3, n_m3, n_wb3, n_retry, n_resp;
  always @(negedge clk) if (rst_n) begin
    if (l2_ev.hit_right) n_right++;
    if (l2_ev.hit_wrong) n_wrong++;
    if (l2_ev.miss_load) n_mld++;
    if (l2_ev.miss_store) n_mst++;
    if (l2_ev.swap) n_swap++;
    if (l2_ev.drain) n_drain++;
    if (l2_ev.writeback) n_wb2++;
    if (l3_hit) n_h3++;
    if (l3_miss) n_m3++;
    if (l3_wb) n_wb3++;
    if (snoop_retry) n_retry++;
    if (resp_valid) n_resp++;
  end

  function automatic logic [ADDR_W-1:0] pool_addr(int unsigned i);
    return ADDR_W'(longint'(i + 64) << OFFSET_W);
  endfunction

  always @(negedge clk) begin
    snoop_valid <= ($urandom_range(3) == 0);
    snoop_addr  <= pool_addr($urandom_range(POOL-1));
  end

  task automatic do_req(op_e op, logic [ADDR_W-1:0] a, line_t d, bmask_t m);
    longint unsigned la;
    la = longint'(a >> OFFSET_W);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d; req_wmask = m;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    if (op == OP_LOAD) check(resp_rdata == ref_line(la), $sformatf("load data of line %0h", la));
    else ref_img[la] = merge_line(ref_line(la), d, m);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NREQ; i++) begin
      int unsigned phase = (i / 150) % 3;
      op_e op;
      case (phase)
        0: op = ($urandom_range(3) != 0) ? OP_STORE : OP_LOAD;
        1: op = ($urandom_range(3) != 0) ? OP_LOAD : OP_STORE;
        default: op = ($urandom_range(1) != 0) ? OP_STORE : OP_LOAD;
      endcase
      do_req(op, pool_addr(($urandom_range(3) == 0) ? $urandom_range(POOL-1) : $urandom_range(39)),
             rand_line(), rand_mask());
      if (phase == 2) repeat ($urandom_range(80)) @(negedge clk);
    end
    repeat (500) @(negedge clk);
    check(n_resp == NREQ, "one response per request");
    $display("L2: right=%0d wrong=%0d miss_ld=%0d miss_st=%0d swap=%0d drain=%0d wb=%0d | L3: hit=%0d miss=%0d wb=%0d | retry=%0d",
             n_right, n_wrong, n_mld, n_mst, n_swap, n_drain, n_wb2, n_h3, n_m3, n_wb3, n_retry);
    check(n_right > 0, "no L2 right-region hit");
    check(n_wrong > 0, "no L2 wrong-region hit");
    check(n_mld > 0 && n_mst > 0, "L2 load and store misses");
    check(n_swap > 0, "no swap");
    check(n_drain > 0, "no swap-buffer drain");
    check(n_wb2 > 0, "no L2 write-back");
    check(n_h3 > 0, "no L3 hit");
    check(n_m3 > 0, "no L3 miss");
    check(n_wb3 > 0, "no L3 write-back");
    check(n_retry > 0, "no snoop retry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
