// tb_tag_status_array: random test of a region's tag and status array.
//
// A 4-set, 4-way array with 8-bit tags receives random updates (valid, dirty, tag, counter
// of one way; every update also makes the way most recently used) and random lookups. A
// reference model in the testbench keeps the same state and an LRU list per set. Checked
// after every operation: hit, hit way, dirty bit and counter of the hit line; the victim
// way (lowest-numbered invalid way, else the least recently used way) with its valid,
// dirty and tag. Reset must leave every way invalid.
`timescale 1ns/1ps
module tb_tag_status_array;
  localparam int SETS = 4, WAYS = 4, TAG_W = 8, CNT_W = 2;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [1:0] lk_set = 0, upd_set = 0, lk_way, vic_way, upd_way = 0;
  logic [TAG_W-1:0] lk_tag = 0, vic_tag, upd_tag = 0;
  logic lk_hit, lk_dirty, vic_valid, vic_dirty, upd_en = 0, upd_valid = 0, upd_dirty = 0;
  logic [CNT_W-1:0] lk_cnt, upd_cnt = 0;

  tag_status_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .CNT_W(CNT_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  bit               m_valid [SETS][WAYS];
  bit               m_dirty [SETS][WAYS];
  logic [TAG_W-1:0] m_tag   [SETS][WAYS];
  logic [CNT_W-1:0] m_cnt   [SETS][WAYS];
  int               m_lru   [SETS][$];   // most recent first

  task automatic check_set(int s, logic [TAG_W-1:0] t);
    int hw, vw;
    bit h;
    lk_set = 2'(s); lk_tag = t;
    #0.1;
    h = 0; hw = 0;
    for (int w = 0; w < WAYS; w++) if (m_valid[s][w] && m_tag[s][w] == t) begin h = 1; hw = w; end
    check(lk_hit == h, $sformatf("hit set %0d tag %0h", s, t));
    if (h) check(int'(lk_way) == hw && lk_dirty == m_dirty[s][hw] && lk_cnt == m_cnt[s][hw],
                 "hit way / dirty / counter");
    vw = -1;
    for (int w = WAYS-1; w >= 0; w--) if (!m_valid[s][w]) vw = w;
    if (vw < 0) vw = m_lru[s][WAYS-1];
    check(int'(vic_way) == vw, $sformatf("victim set %0d: %0d expected %0d", s, vic_way, vw));
    check(vic_valid == m_valid[s][vw] && (!vic_valid || (vic_dirty == m_dirty[s][vw] && vic_tag == m_tag[s][vw])),
          "victim status");
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      m_valid[s][w] = 0; m_lru[s].push_back(w);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < SETS; s++) check_set(s, 8'h00);
    for (int n = 0; n < 2000; n++) begin
      int s, w;
      logic [TAG_W-1:0] t;
      bit clash;
      s = $urandom_range(SETS-1);
      // lookup a tag that is present about half the time
      t = ($urandom_range(1) && m_valid[s][0]) ? m_tag[s][$urandom_range(WAYS-1)] : TAG_W'($urandom_range(15));
      check_set(s, t);
      // update one way with a tag unique in its set
      w = $urandom_range(WAYS-1);
      do begin
        t = TAG_W'($urandom_range(15));
        clash = 0;
        for (int k = 0; k < WAYS; k++) if (k != w && m_valid[s][k] && m_tag[s][k] == t) clash = 1;
      end while (clash);
      upd_en = 1; upd_set = 2'(s); upd_way = 2'(w); upd_valid = ($urandom_range(7) != 0);
      upd_dirty = 1'($urandom); upd_tag = t; upd_cnt = CNT_W'($urandom);
      @(negedge clk);
      upd_en = 0;
      m_valid[s][w] = upd_valid; m_dirty[s][w] = upd_dirty; m_tag[s][w] = t; m_cnt[s][w] = upd_cnt;
      foreach (m_lru[s][i]) if (m_lru[s][i] == w) begin m_lru[s].delete(i); break; end
      m_lru[s].push_front(w);
      check_set(s, t);
    end
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
