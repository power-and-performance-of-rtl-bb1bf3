// tb_rwhca_l2: end-to-end random test of the hybrid cache with a reference memory image.
//
// The cache runs at reduced size (8 sets, 3 read-region ways, 1 write-region way, a 4-entry
// swap buffer) with the published latencies (SRAM 6, MRAM read 20 / write 60) and a 50-cycle
// memory. A random stream of loads and partial-line stores over 48 lines (more than the 32
// the cache holds) is issued in phases: back-to-back phases keep the controller busy so that
// the swap buffer fills and conflicts occur, gap phases let it drain. Snoops to random pool
// lines run alongside.
// Checks: every load returns the bytes of the reference image (all earlier stores merged
// into the memory's initial content); every hit answers after exactly its region's latency
// plus one cycle unless a swap-buffer drain intervened; a snoop retry only appears while the
// swap buffer holds entries; one response per request. It then counts each mechanism --
// right/wrong-region hits, load and store misses, swaps of both kinds, write-backs, drains,
// set conflicts, full swap buffer, snoop retries -- and fails any that never happened.
`timescale 1ns/1ps
module tb_rwhca_l2;
  import rwhca_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned ADDR_W = 40;
  localparam int unsigned SETS = 8, RD_WAYS = 3, WR_WAYS = 1, SB_DEPTH = 4;
  localparam int unsigned SRAM_LAT = 6, NVM_RD_LAT = 20, NVM_WR_LAT = 60, MEM_LAT = 50;
  localparam int unsigned NREQ = 4000;
  localparam int unsigned POOL = 48;

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
  logic [$clog2(SB_DEPTH+1)-1:0] sb_count;

  rwhca_l2 #(.ADDR_W(ADDR_W), .SETS(SETS), .RD_WAYS(RD_WAYS), .WR_WAYS(WR_WAYS),
             .SRAM_LAT(SRAM_LAT), .NVM_RD_LAT(NVM_RD_LAT), .NVM_WR_LAT(NVM_WR_LAT),
             .SB_DEPTH(SB_DEPTH)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata, .req_wmask,
    .resp_valid, .resp_rdata, .snoop_valid, .snoop_addr, .snoop_retry,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata, .ev_o(ev), .sb_count_o(sb_count)
  );

  mem_model #(.ADDR_W(ADDR_W), .LAT(MEM_LAT)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // reference image
  line_t ref_img [longint unsigned];
  function automatic line_t ref_line(longint unsigned la);
    return ref_img.exists(la) ? ref_img[la] : init_line(la);
  endfunction

  // mechanism counters
  int n_hit_right, n_hit_wrong, n_miss_ld, n_miss_st, n_swap_st, n_swap_ld, n_wb, n_drain,
      n_conflict, n_retry, n_full, n_resp;
  bit saw_conflict;
  op_e last_resp_op = OP_LOAD;

  always @(negedge clk) if (rst_n) begin
    if (ev.hit_right)   n_hit_right++;
    if (ev.hit_wrong)   n_hit_wrong++;
    if (ev.miss_load)   n_miss_ld++;
    if (ev.miss_store)  n_miss_st++;
    if (ev.writeback)   n_wb++;
    if (ev.drain)       n_drain++;
    if (ev.conflict)    begin n_conflict++; saw_conflict = 1; end
    if (ev.snoop_retry) n_retry++;
    if (ev.swap) begin
      if (last_resp_op == OP_STORE) n_swap_st++; else n_swap_ld++;
    end
    if (int'(sb_count) == SB_DEPTH) n_full++;
    if (snoop_retry) check(sb_count != 0, "snoop retry with an empty swap buffer");
    if (resp_valid) n_resp++;
  end

  // snoop traffic
  always @(negedge clk) begin
    snoop_valid <= ($urandom_range(3) == 0);
    snoop_addr  <= pool_addr($urandom_range(POOL-1));
  end

  function automatic logic [ADDR_W-1:0] pool_addr(int unsigned i);
    // 8 sets x 6 tags; bits above the set index carry the tag
    return ADDR_W'((longint'(i / SETS) + 1) << (OFFSET_W + $clog2(SETS)))
         | ADDR_W'(longint'(i % SETS) << OFFSET_W);
  endfunction

  task automatic do_req(op_e op, logic [ADDR_W-1:0] a, line_t d, bmask_t m);
    longint unsigned t_acc, lat;
    longint unsigned la;
    bit hit_r, hit_w;
    la = longint'(a >> OFFSET_W);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d; req_wmask = m;
    saw_conflict = 0;
    while (!req_ready) @(negedge clk);
    t_acc = cyc;
    @(negedge clk);
    req_valid = 0;
    hit_r = 0; hit_w = 0;
    while (!resp_valid) begin
      if (ev.hit_right) hit_r = 1;
      if (ev.hit_wrong) hit_w = 1;
      @(negedge clk);
    end
    lat = cyc - t_acc;
    last_resp_op = op;
    if (op == OP_LOAD) begin
      check(resp_rdata == ref_line(la), $sformatf("load data of line %0h", la));
    end else begin
      ref_img[la] = merge_line(ref_line(la), d, m);
    end
    if ((hit_r || hit_w) && !saw_conflict) begin
      int unsigned exp;
      if (hit_r) exp = (op == OP_LOAD) ? NVM_RD_LAT : SRAM_LAT;
      else       exp = (op == OP_LOAD) ? SRAM_LAT : NVM_WR_LAT;
      check(lat == longint'(exp + 1), $sformatf("hit latency %0d, expected %0d", lat, exp + 1));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NREQ; i++) begin
      int unsigned phase = (i / 200) % 4;
      int unsigned li;
      op_e op;
      // phases: 0 mixed with gaps, 1 store-heavy back-to-back, 2 load-heavy back-to-back,
      // 3 mixed back-to-back on a few sets
      li = (phase == 3) ? $urandom_range(15) : $urandom_range(POOL-1);
      case (phase)
        1: op = ($urandom_range(3) != 0) ? OP_STORE : OP_LOAD;
        2: op = ($urandom_range(3) != 0) ? OP_LOAD : OP_STORE;
        default: op = ($urandom_range(1) != 0) ? OP_STORE : OP_LOAD;
      endcase
      do_req(op, pool_addr(li), rand_line(), rand_mask());
      if (phase == 0) repeat ($urandom_range(100)) @(negedge clk);
    end
    // back-to-back burst of load-triggered swaps in distinct sets: fills the swap buffer
    for (int s = 0; s < int'(SETS); s++) begin
      logic [ADDR_W-1:0] a;
      a = pool_addr(s) | ADDR_W'(64'h7 << (OFFSET_W + $clog2(SETS) + 3));
      do_req(OP_STORE, a, rand_line(), rand_mask());
      do_req(OP_LOAD, a, '0, '0);
      do_req(OP_LOAD, a, '0, '0);
    end
    repeat (400) @(negedge clk);
    check(n_resp == NREQ + 3*SETS, $sformatf("responses %0d for %0d requests", n_resp, NREQ));
    $display("mechanisms: hit_right=%0d hit_wrong=%0d miss_load=%0d miss_store=%0d swap_store=%0d swap_load=%0d writeback=%0d drain=%0d conflict=%0d sb_full_cycles=%0d snoop_retry=%0d",
             n_hit_right, n_hit_wrong, n_miss_ld, n_miss_st, n_swap_st, n_swap_ld, n_wb,
             n_drain, n_conflict, n_full, n_retry);
    check(n_hit_right > 0, "no right-region hit");
    check(n_hit_wrong > 0, "no wrong-region hit");
    check(n_miss_ld > 0,   "no load miss");
    check(n_miss_st > 0,   "no store miss");
    check(n_swap_st > 0,   "no swap after store hits in the read region");
    check(n_swap_ld > 0,   "no swap after load hits in the write region");
    check(n_wb > 0,        "no dirty write-back");
    check(n_drain > 0,     "no swap-buffer drain");
    check(n_conflict > 0,  "no set conflict with the swap buffer");
    check(n_full > 0,      "swap buffer never full");
    check(n_retry > 0,     "no snoop retry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
