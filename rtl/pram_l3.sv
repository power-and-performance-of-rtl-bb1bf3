// pram_l3: phase-change RAM (PRAM) L3 cache stacked on the hybrid L2 (3D configuration).
//
// A conventional set-associative, write-back, write-allocate cache whose data array is
// PRAM: dense and low-leakage, but slow (read 40, write 200 core cycles). Its capacity is
// 32 MB in the stacked configuration. It sits between the hybrid L2's memory port and main
// memory and serves one line request at a time:
//  * read hit  -> PRAM read, line returned (40 cycles after the lookup cycle)
//  * read miss -> dirty victim written to memory, line fetched from memory and returned at
//                 once, then filled into the PRAM array (clean)
//  * write     -> the L2 writes back a whole dirty line: on a hit the line is overwritten
//                 and marked dirty; on a miss a victim is chosen (written back if dirty) and
//                 the line is written without a fetch, since the whole line is supplied.
// The tag side reuses the hybrid cache's tag/status array (its per-line counter is not used
// by this level and is written as 0) and the data side the region data array with PRAM
// timing. Associativity (16), replacement (LRU) and the policies above are this design's
// choices; the architecture description gives only the capacity, the technology and its latencies.
//
// Interfaces: both sides use the same line protocol as the L2's memory port: req
// valid/ready with we/address/data, and a one-cycle resp_valid pulse carrying read data.
// Upstream requests are accepted only when the cache is idle.
module pram_l3
  import rwhca_pkg::*;
#(
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned SETS   = 16384,
  parameter int unsigned WAYS   = 16,
  parameter int unsigned RD_LAT = 40,
  parameter int unsigned WR_LAT = 200
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream (from the L2)
  input  logic              up_req_valid,
  output logic              up_req_ready,
  input  logic              up_req_we,
  input  logic [ADDR_W-1:0] up_req_addr,
  input  line_t             up_req_wdata,
  output logic              up_resp_valid,
  output line_t             up_resp_rdata,
  // downstream (to memory)
  output logic              dn_req_valid,
  input  logic              dn_req_ready,
  output logic              dn_req_we,
  output logic [ADDR_W-1:0] dn_req_addr,
  output line_t             dn_req_wdata,
  input  logic              dn_resp_valid,
  input  line_t             dn_resp_rdata,
  // statistics: one-cycle pulses
  output logic              ev_hit_o,
  output logic              ev_miss_o,
  output logic              ev_writeback_o
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = ADDR_W - OFFSET_W - SET_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_HIT, S_WB_RD, S_WB_RD_WAIT, S_WB_MEM, S_MISS_REQ, S_MISS_WAIT,
    S_FILL, S_FILL_WAIT
  } state_e;

  state_e            state_q, state_d;
  logic              we_q;
  logic [ADDR_W-1:0] addr_q;
  line_t             line_q;
  logic [WAY_W-1:0]  way_q;
  logic [TAG_W-1:0]  vic_tag_q;
  line_t             vic_q;       // dirty victim on its way to memory
  logic              d_req_we_q;  // the array access in flight is a write

  wire [SET_W-1:0] set_q = addr_q[OFFSET_W +: SET_W];
  wire [TAG_W-1:0] tag_q = addr_q[ADDR_W-1 -: TAG_W];

  // tag array
  logic             t_hit, t_dirty, t_vic_valid, t_vic_dirty;
  logic [WAY_W-1:0] t_way, t_vic_way;
  logic [0:0]       t_cnt;
  logic [TAG_W-1:0] t_vic_tag;
  logic             t_upd_en, t_upd_dirty;

  tag_status_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .CNT_W(1)) u_tags (
    .clk, .rst_n, .lk_set(set_q), .lk_tag(tag_q),
    .lk_hit(t_hit), .lk_way(t_way), .lk_dirty(t_dirty), .lk_cnt(t_cnt),
    .vic_way(t_vic_way), .vic_valid(t_vic_valid), .vic_dirty(t_vic_dirty), .vic_tag(t_vic_tag),
    .upd_en(t_upd_en), .upd_set(set_q), .upd_way(way_q), .upd_valid(1'b1),
    .upd_dirty(t_upd_dirty), .upd_tag(tag_q), .upd_cnt(1'b0)
  );

  // PRAM data array
  logic  d_req_valid, d_req_ready, d_req_we, d_done;
  line_t d_rdata;

  region_data_array #(.SETS(SETS), .WAYS(WAYS), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) u_data (
    .clk, .rst_n, .req_valid(d_req_valid), .req_ready(d_req_ready), .req_we(d_req_we),
    .req_set(set_q), .req_way(way_q), .req_wdata(line_q), .req_wmask('1),
    .done_o(d_done), .rdata_o(d_rdata)
  );

  assign up_req_ready = (state_q == S_IDLE);

  always_comb begin
    state_d        = state_q;
    up_resp_valid  = 1'b0;
    up_resp_rdata  = d_rdata;
    dn_req_valid   = 1'b0;
    dn_req_we      = 1'b0;
    dn_req_addr    = {tag_q, set_q, OFFSET_W'(0)};
    dn_req_wdata   = vic_q;
    d_req_valid    = 1'b0;
    d_req_we       = 1'b0;
    t_upd_en       = 1'b0;
    t_upd_dirty    = 1'b0;
    ev_hit_o       = 1'b0;
    ev_miss_o      = 1'b0;
    ev_writeback_o = 1'b0;

    unique case (state_q)
      S_IDLE: if (up_req_valid) state_d = S_LOOKUP;
      S_LOOKUP: begin
        if (t_hit) begin
          ev_hit_o = 1'b1;
          state_d  = S_HIT;
        end else begin
          ev_miss_o = 1'b1;
          state_d   = (t_vic_valid && t_vic_dirty) ? S_WB_RD
                    : (we_q ? S_FILL : S_MISS_REQ);
        end
      end
      // hit: one array access (read, or overwrite for a write-back from the L2)
      S_HIT: begin
        d_req_valid = 1'b1;
        d_req_we    = we_q;
        if (d_req_ready) begin
          t_upd_en    = 1'b1;
          t_upd_dirty = we_q || t_dirty;
          state_d     = S_FILL_WAIT;
        end
      end
      S_WB_RD: begin
        d_req_valid = 1'b1;
        if (d_req_ready) state_d = S_WB_RD_WAIT;
      end
      S_WB_RD_WAIT: if (d_done) state_d = S_WB_MEM;
      S_WB_MEM: begin
        dn_req_valid = 1'b1;
        dn_req_we    = 1'b1;
        dn_req_addr  = {vic_tag_q, set_q, OFFSET_W'(0)};
        if (dn_req_ready) begin
          ev_writeback_o = 1'b1;
          state_d = we_q ? S_FILL : S_MISS_REQ;
        end
      end
      S_MISS_REQ: begin
        dn_req_valid = 1'b1;
        if (dn_req_ready) state_d = S_MISS_WAIT;
      end
      S_MISS_WAIT: begin
        if (dn_resp_valid) begin
          up_resp_valid = 1'b1;
          up_resp_rdata = dn_resp_rdata;
          state_d       = S_FILL;
        end
      end
      S_FILL: begin
        d_req_valid = 1'b1;
        d_req_we    = 1'b1;
        if (d_req_ready) begin
          t_upd_en    = 1'b1;
          t_upd_dirty = we_q;
          state_d     = S_FILL_WAIT;
        end
      end
      S_FILL_WAIT: begin
        if (d_done) begin
          // a read hit answers here with the array data
          up_resp_valid = !we_q && !d_req_we_q;
          state_d       = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      d_req_we_q <= 1'b0;
    end else begin
      state_q <= state_d;
      if (d_req_valid && d_req_ready) d_req_we_q <= d_req_we;
    end
  end

  always_ff @(posedge clk) begin
    unique case (state_q)
      S_IDLE: if (up_req_valid) begin
        we_q   <= up_req_we;
        addr_q <= up_req_addr;
        line_q <= up_req_wdata;
      end
      S_LOOKUP: begin
        way_q     <= t_hit ? t_way : t_vic_way;
        vic_tag_q <= t_vic_tag;
      end
      S_WB_RD_WAIT: if (d_done) vic_q <= d_rdata;
      S_MISS_WAIT:  if (dn_resp_valid) line_q <= dn_resp_rdata;
      default: ;
    endcase
  end
endmodule
