// tag_status_array: tag and status array of one region of the hybrid cache.
//
// For each of SETS sets and WAYS ways it keeps a valid bit, a dirty bit, the address tag
// and the line's saturating counter (the new per-line state of the read-write aware
// cache), plus true-LRU ages per set. The lookup port compares the tag of the incoming
// address with all ways of the selected set in parallel and reports hit, hit way and the
// hit line's status. In the same cycle it names the replacement victim of the set: the
// first invalid way, or else the least recently used way, with that way's status.
// The lookup is combinational on the stored state.
//
// The update port writes one way's state (valid, dirty, tag, counter) on the next clock
// edge and makes that way the most recently used of its set (every update is an access,
// an allocation or a swap). LRU is
// kept as an age per way (0 = most recent, WAYS-1 = least recent): touching a way resets
// its age and ages every way that was younger than it.
// Reset clears all valid bits and sets the ages to a permutation of 0..WAYS-1.
// The address decoder of the region is the split of the address into tag and set index,
// done by the caller.
// The fields valid, tag and saturating counter follow the RWHCA design; the dirty bit and
// the true-LRU implementation are choices of this implementation.
module tag_status_array #(
  parameter int unsigned SETS  = 2048,
  parameter int unsigned WAYS  = 15,
  parameter int unsigned TAG_W = 22,
  parameter int unsigned CNT_W = 2,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [SET_W-1:0] lk_set,
  input  logic [TAG_W-1:0] lk_tag,
  output logic             lk_hit,
  output logic [WAY_W-1:0] lk_way,
  output logic             lk_dirty,
  output logic [CNT_W-1:0] lk_cnt,
  // replacement victim of lk_set
  output logic [WAY_W-1:0] vic_way,
  output logic             vic_valid,
  output logic             vic_dirty,
  output logic [TAG_W-1:0] vic_tag,
  // update
  input  logic             upd_en,
  input  logic [SET_W-1:0] upd_set,
  input  logic [WAY_W-1:0] upd_way,
  input  logic             upd_valid,
  input  logic             upd_dirty,
  input  logic [TAG_W-1:0] upd_tag,
  input  logic [CNT_W-1:0] upd_cnt
);
  localparam int unsigned AGE_W = WAY_W;

  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAYS-1:0]  dirty_q [SETS];
  logic [TAG_W-1:0] tag_q   [SETS][WAYS];
  logic [CNT_W-1:0] cnt_q   [SETS][WAYS];
  logic [AGE_W-1:0] age_q   [SETS][WAYS];

  // ---------------- lookup ----------------
  always_comb begin
    lk_hit   = 1'b0;
    lk_way   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[lk_set][w] && tag_q[lk_set][w] == lk_tag) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
    end
    lk_dirty = dirty_q[lk_set][lk_way];
    lk_cnt   = cnt_q[lk_set][lk_way];
  end

  // ---------------- victim ----------------
  always_comb begin
    logic [AGE_W-1:0] oldest;
    vic_way   = '0;
    oldest    = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (age_q[lk_set][w] >= oldest) begin
        oldest  = age_q[lk_set][w];
        vic_way = WAY_W'(w);
      end
    end
    for (int w = WAYS-1; w >= 0; w--) begin
      if (!valid_q[lk_set][w]) begin
        vic_way   = WAY_W'(w);
      end
    end
    vic_valid = valid_q[lk_set][vic_way];
    vic_dirty = dirty_q[lk_set][vic_way];
    vic_tag   = tag_q[lk_set][vic_way];
  end

  // ---------------- update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) age_q[s][w] <= AGE_W'(w);
      end
    end else if (upd_en) begin
      valid_q[upd_set][upd_way] <= upd_valid;
      for (int w = 0; w < WAYS; w++) begin
        if (WAY_W'(w) == upd_way)
          age_q[upd_set][w] <= '0;
        else if (age_q[upd_set][w] < age_q[upd_set][upd_way])
          age_q[upd_set][w] <= age_q[upd_set][w] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en) begin
      dirty_q[upd_set][upd_way] <= upd_dirty;
      tag_q[upd_set][upd_way]   <= upd_tag;
      cnt_q[upd_set][upd_way]   <= upd_cnt;
    end
  end
endmodule
