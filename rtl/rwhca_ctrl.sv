// rwhca_ctrl: controller of the read-write aware hybrid cache (RWHCA).
//
// The cache is split into a small, fast-to-write SRAM write region and a large STT-MRAM
// read region; a line lives in exactly one of them. The controller serves one request from
// the upper-level cache at a time and applies the allocation and migration policy:
//  * load miss  -> allocate in the read region (its LRU way), counter := CNT_INIT
//  * store miss -> allocate in the write region (its LRU way), counter := CNT_INIT
//  * load hit in the read region or store hit in the write region -> serve, counter + 1
//  * load hit in the write region or store hit in the read region -> serve, counter - 1;
//    if the decrement left the counter's MSB at 0, swap the line with the LRU line of the
//    same set in the opposite region and set both counters to CNT_INIT.
// The data is returned before the swap, so the swap stays off the critical path.
// A swap is serialized through the swap buffer: (1) the write-region line is read into the
// buffer (for a load hit in the write region the line just read for the load is pushed, with
// no second read), (2) the read-region line is read and written into the write region,
// (3) the buffered line is written into the read region later, whenever the controller is
// idle, the buffer is full, or a request touches a set that still has a buffered entry.
// Both tag entries are updated when step 2 ends. Misses write a dirty victim back to memory,
// then fetch the line, merge the store bytes, and fill it (write-back, write-allocate).
// Snoops are checked against the swap buffer only; a hit is answered with snoop_retry.
// The policy, the counter rule and the three-step swap follow the published RWHCA design;
// the drain rule, the conflict wait, one request at a time, write-back with dirty bits and
// the interfaces are choices of this implementation.
//
// Timing (with the arrays' own latencies L): request accepted in IDLE, tags looked up in the
// next cycle (LOOKUP), the data array request issued in that same cycle, and the response
// raised in the cycle the array reports done, i.e. L+1 cycles after the request was accepted.
// Interfaces: req valid/ready (ready only in IDLE); resp_valid one-cycle pulse; memory port
// with valid/ready requests and a resp_valid pulse carrying a read line.
module rwhca_ctrl
  import rwhca_pkg::*;
#(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned SETS     = 2048,
  parameter int unsigned RD_WAYS  = 15,
  parameter int unsigned WR_WAYS  = 1,
  parameter int unsigned CNT_W    = 2,
  parameter logic [CNT_W-1:0] CNT_INIT = '1,
  localparam int unsigned SET_W   = $clog2(SETS),
  localparam int unsigned TAG_W   = ADDR_W - OFFSET_W - SET_W,
  localparam int unsigned LADDR_W = ADDR_W - OFFSET_W,
  localparam int unsigned RW_W    = (RD_WAYS > 1) ? $clog2(RD_WAYS) : 1,
  localparam int unsigned WW_W    = (WR_WAYS > 1) ? $clog2(WR_WAYS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // upper level
  input  logic               req_valid,
  output logic               req_ready,
  input  op_e                req_op,
  input  logic [ADDR_W-1:0]  req_addr,
  input  line_t              req_wdata,
  input  bmask_t             req_wmask,
  output logic               resp_valid,
  output line_t              resp_rdata,
  // coherence snoop
  input  logic               snoop_valid,
  input  logic [ADDR_W-1:0]  snoop_addr,
  output logic               snoop_retry,
  // memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [ADDR_W-1:0]  mem_req_addr,
  output line_t              mem_req_wdata,
  input  logic               mem_resp_valid,
  input  line_t              mem_resp_rdata,
  // tag arrays: shared lookup address
  output logic [SET_W-1:0]   lk_set,
  output logic [TAG_W-1:0]   lk_tag,
  // read-region tag array
  input  logic               rt_hit,
  input  logic [RW_W-1:0]    rt_way,
  input  logic               rt_dirty,
  input  logic [CNT_W-1:0]   rt_cnt,
  input  logic [RW_W-1:0]    rt_vic_way,
  input  logic               rt_vic_valid,
  input  logic               rt_vic_dirty,
  input  logic [TAG_W-1:0]   rt_vic_tag,
  output logic               rt_upd_en,
  output logic [RW_W-1:0]    rt_upd_way,
  output logic               rt_upd_valid,
  output logic               rt_upd_dirty,
  output logic [TAG_W-1:0]   rt_upd_tag,
  output logic [CNT_W-1:0]   rt_upd_cnt,
  // write-region tag array
  input  logic               wt_hit,
  input  logic [WW_W-1:0]    wt_way,
  input  logic               wt_dirty,
  input  logic [CNT_W-1:0]   wt_cnt,
  input  logic [WW_W-1:0]    wt_vic_way,
  input  logic               wt_vic_valid,
  input  logic               wt_vic_dirty,
  input  logic [TAG_W-1:0]   wt_vic_tag,
  output logic               wt_upd_en,
  output logic [WW_W-1:0]    wt_upd_way,
  output logic               wt_upd_valid,
  output logic               wt_upd_dirty,
  output logic [TAG_W-1:0]   wt_upd_tag,
  output logic [CNT_W-1:0]   wt_upd_cnt,
  // read-region data array
  output logic               rd_req_valid,
  input  logic               rd_req_ready,
  output logic               rd_req_we,
  output logic [SET_W-1:0]   rd_req_set,
  output logic [RW_W-1:0]    rd_req_way,
  output line_t              rd_req_wdata,
  output bmask_t             rd_req_wmask,
  input  logic               rd_done,
  input  line_t              rd_rdata,
  // write-region data array
  output logic               wd_req_valid,
  input  logic               wd_req_ready,
  output logic               wd_req_we,
  output logic [SET_W-1:0]   wd_req_set,
  output logic [WW_W-1:0]    wd_req_way,
  output line_t              wd_req_wdata,
  output bmask_t             wd_req_wmask,
  input  logic               wd_done,
  input  line_t              wd_rdata,
  // swap buffer
  output logic               sb_push,
  output logic [LADDR_W-1:0] sb_push_laddr,
  output logic [SET_W-1:0]   sb_push_set,
  output logic [RW_W-1:0]    sb_push_way,
  output line_t              sb_push_data,
  input  logic               sb_full,
  input  logic               sb_empty,
  output logic               sb_pop,
  input  logic [SET_W-1:0]   sb_head_set,
  input  logic [RW_W-1:0]    sb_head_way,
  input  line_t              sb_head_data,
  output logic [LADDR_W-1:0] sb_snoop_laddr,
  input  logic               sb_snoop_hit,
  output logic [SET_W-1:0]   sb_chk_set,
  input  logic               sb_chk_hit,
  // statistics
  output ev_t                ev_o
);
  typedef enum logic [4:0] {
    S_IDLE, S_LOOKUP, S_HIT_WAIT,
    S_SW_START, S_SW_RDW, S_SW_RDW_WAIT, S_SW_RDR, S_SW_RDR_WAIT, S_SW_WRW, S_SW_WRW_WAIT,
    S_SW_TAGS,
    S_WB_RD, S_WB_RD_WAIT, S_WB_MEM, S_MISS_REQ, S_MISS_WAIT, S_FILL, S_FILL_WAIT,
    S_DRAIN, S_DRAIN_WAIT
  } state_e;

  state_e state_q, state_d, ret_q, ret_d;

  // request registers
  op_e               op_q;
  logic [ADDR_W-1:0] addr_q;
  line_t             wdata_q;
  bmask_t            wmask_q;
  line_t             line_q;        // data staging register
  // hit / swap bookkeeping
  region_e           hreg_q;        // region that hit (A's region for a swap)
  logic              swap_q;        // swap requested by the counter
  logic [RW_W-1:0]   r_way_q;       // read-region slot of the swap, or fill way
  logic [WW_W-1:0]   w_way_q;       // write-region slot of the swap, or fill way
  logic              x_valid_q, x_dirty_q;  // line X currently in the read slot
  logic [TAG_W-1:0]  x_tag_q;
  logic              y_valid_q, y_dirty_q;  // line Y currently in the write slot
  logic [TAG_W-1:0]  y_tag_q;
  // miss bookkeeping (victim of the target region)
  logic [TAG_W-1:0]  vic_tag_q;

  wire [SET_W-1:0] set_q = addr_q[OFFSET_W +: SET_W];
  wire [TAG_W-1:0] tag_q = addr_q[ADDR_W-1 -: TAG_W];

  assign lk_set         = set_q;
  assign lk_tag         = tag_q;
  assign sb_chk_set     = set_q;
  assign sb_snoop_laddr = snoop_addr[ADDR_W-1:OFFSET_W];
  assign snoop_retry    = snoop_valid && sb_snoop_hit;
  assign req_ready      = (state_q == S_IDLE);

  // ---------------- counter of the hit line ----------------
  wire hit_any   = rt_hit || wt_hit;
  wire hit_in_wr = wt_hit;
  wire right_reg = (op_q == OP_LOAD) ? !hit_in_wr : hit_in_wr;
  logic [CNT_W-1:0] cnt_new;
  logic             cnt_swap;

  sat_counter #(.CNT_W(CNT_W), .CNT_INIT(CNT_INIT)) u_cnt (
    .cnt_i  (hit_in_wr ? wt_cnt : rt_cnt),
    .init_i (1'b0),
    .inc_i  (right_reg),
    .dec_i  (!right_reg),
    .cnt_o  (cnt_new),
    .swap_o (cnt_swap)
  );

  // ---------------- next state and outputs ----------------
  always_comb begin
    state_d = state_q;
    ret_d   = ret_q;

    resp_valid = 1'b0;
    resp_rdata = line_q;

    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {tag_q, set_q, OFFSET_W'(0)};
    mem_req_wdata = line_q;

    rt_upd_en = 1'b0; rt_upd_way = r_way_q; rt_upd_valid = 1'b1; rt_upd_dirty = 1'b0;
    rt_upd_tag = tag_q; rt_upd_cnt = CNT_INIT;
    wt_upd_en = 1'b0; wt_upd_way = w_way_q; wt_upd_valid = 1'b1; wt_upd_dirty = 1'b0;
    wt_upd_tag = tag_q; wt_upd_cnt = CNT_INIT;

    rd_req_valid = 1'b0; rd_req_we = 1'b0; rd_req_set = set_q; rd_req_way = r_way_q;
    rd_req_wdata = line_q; rd_req_wmask = '1;
    wd_req_valid = 1'b0; wd_req_we = 1'b0; wd_req_set = set_q; wd_req_way = w_way_q;
    wd_req_wdata = line_q; wd_req_wmask = '1;

    sb_push = 1'b0; sb_push_laddr = {y_tag_q, set_q}; sb_push_set = set_q;
    sb_push_way = r_way_q; sb_push_data = wd_rdata;
    sb_pop = 1'b0;

    ev_o = '0;
    ev_o.snoop_retry = snoop_retry;

    unique case (state_q)
      S_IDLE: begin
        if (!req_valid && !sb_empty) begin
          ret_d   = S_IDLE;
          state_d = S_DRAIN;
        end else if (req_valid) begin
          state_d = S_LOOKUP;
        end
      end

      S_LOOKUP: begin
        if (sb_chk_hit) begin
          // a buffered line still belongs to this set: write it home first
          ev_o.conflict = 1'b1;
          ret_d   = S_LOOKUP;
          state_d = S_DRAIN;
        end else if (hit_any) begin
          if (hit_in_wr) begin
            wd_req_valid = 1'b1;
            wd_req_we    = (op_q == OP_STORE);
            wd_req_way   = wt_way;
            wd_req_wdata = wdata_q;
            wd_req_wmask = wmask_q;
          end else begin
            rd_req_valid = 1'b1;
            rd_req_we    = (op_q == OP_STORE);
            rd_req_way   = rt_way;
            rd_req_wdata = wdata_q;
            rd_req_wmask = wmask_q;
          end
          if (hit_in_wr ? wd_req_ready : rd_req_ready) begin
            // counter, dirty bit and LRU of the hit line
            if (hit_in_wr) begin
              wt_upd_en    = 1'b1;
              wt_upd_way   = wt_way;
              wt_upd_dirty = wt_dirty || (op_q == OP_STORE);
              wt_upd_cnt   = cnt_new;
            end else begin
              rt_upd_en    = 1'b1;
              rt_upd_way   = rt_way;
              rt_upd_dirty = rt_dirty || (op_q == OP_STORE);
              rt_upd_cnt   = cnt_new;
            end
            ev_o.hit_right = right_reg;
            ev_o.hit_wrong = !right_reg;
            state_d = S_HIT_WAIT;
          end
        end else begin
          ev_o.miss_load  = (op_q == OP_LOAD);
          ev_o.miss_store = (op_q == OP_STORE);
          if ((op_q == OP_LOAD) ? (rt_vic_valid && rt_vic_dirty) : (wt_vic_valid && wt_vic_dirty))
            state_d = S_WB_RD;
          else
            state_d = S_MISS_REQ;
        end
      end

      S_HIT_WAIT: begin
        if (hreg_q == REG_WRITE ? wd_done : rd_done) begin
          resp_valid = 1'b1;
          resp_rdata = (hreg_q == REG_WRITE) ? wd_rdata : rd_rdata;
          state_d    = swap_q ? S_SW_START : S_IDLE;
        end
      end

      // ---- swap: A = hit line in the wrong region ----
      S_SW_START: begin
        if (y_valid_q && sb_full) begin
          ret_d   = S_SW_START;
          state_d = S_DRAIN;
        end else begin
          ev_o.swap = 1'b1;
          if (hreg_q == REG_WRITE) begin
            // load hit in the write region: line_q already holds A, push it (step 1)
            sb_push       = 1'b1;
            sb_push_laddr = {tag_q, set_q};
            sb_push_data  = line_q;
            state_d       = x_valid_q ? S_SW_RDR : S_SW_TAGS;
          end else begin
            state_d = y_valid_q ? S_SW_RDW : S_SW_RDR;
          end
        end
      end
      S_SW_RDW: begin
        wd_req_valid = 1'b1;
        if (wd_req_ready) state_d = S_SW_RDW_WAIT;
      end
      S_SW_RDW_WAIT: begin
        if (wd_done) begin
          sb_push = 1'b1;
          state_d = S_SW_RDR;
        end
      end
      S_SW_RDR: begin
        rd_req_valid = 1'b1;
        if (rd_req_ready) state_d = S_SW_RDR_WAIT;
      end
      S_SW_RDR_WAIT: begin
        if (rd_done) state_d = S_SW_WRW;
      end
      S_SW_WRW: begin
        wd_req_valid = 1'b1;
        wd_req_we    = 1'b1;
        if (wd_req_ready) state_d = S_SW_WRW_WAIT;
      end
      S_SW_WRW_WAIT: begin
        if (wd_done) state_d = S_SW_TAGS;
      end
      S_SW_TAGS: begin
        // write slot receives X, read slot receives Y
        wt_upd_en    = 1'b1;
        wt_upd_valid = x_valid_q;
        wt_upd_dirty = x_dirty_q;
        wt_upd_tag   = x_tag_q;
        rt_upd_en    = 1'b1;
        rt_upd_valid = y_valid_q;
        rt_upd_dirty = y_dirty_q;
        rt_upd_tag   = y_tag_q;
        state_d      = S_IDLE;
      end

      // ---- miss ----
      S_WB_RD: begin
        if (op_q == OP_LOAD) rd_req_valid = 1'b1; else wd_req_valid = 1'b1;
        if ((op_q == OP_LOAD) ? rd_req_ready : wd_req_ready) state_d = S_WB_RD_WAIT;
      end
      S_WB_RD_WAIT: begin
        if ((op_q == OP_LOAD) ? rd_done : wd_done) state_d = S_WB_MEM;
      end
      S_WB_MEM: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = {vic_tag_q, set_q, OFFSET_W'(0)};
        if (mem_req_ready) begin
          ev_o.writeback = 1'b1;
          state_d = S_MISS_REQ;
        end
      end
      S_MISS_REQ: begin
        mem_req_valid = 1'b1;
        if (mem_req_ready) state_d = S_MISS_WAIT;
      end
      S_MISS_WAIT: begin
        if (mem_resp_valid) begin
          if (op_q == OP_LOAD) begin
            resp_valid = 1'b1;
            resp_rdata = mem_resp_rdata;
          end
          state_d = S_FILL;
        end
      end
      S_FILL: begin
        if (op_q == OP_LOAD) begin
          rd_req_valid = 1'b1;
          rd_req_we    = 1'b1;
          if (rd_req_ready) state_d = S_FILL_WAIT;
        end else begin
          wd_req_valid = 1'b1;
          wd_req_we    = 1'b1;
          if (wd_req_ready) state_d = S_FILL_WAIT;
        end
      end
      S_FILL_WAIT: begin
        if ((op_q == OP_LOAD) ? rd_done : wd_done) begin
          if (op_q == OP_LOAD) begin
            rt_upd_en = 1'b1;
          end else begin
            wt_upd_en    = 1'b1;
            wt_upd_dirty = 1'b1;
            resp_valid   = 1'b1;
          end
          state_d = S_IDLE;
        end
      end

      // ---- write one buffered line into the read region ----
      S_DRAIN: begin
        rd_req_valid = 1'b1;
        rd_req_we    = 1'b1;
        rd_req_set   = sb_head_set;
        rd_req_way   = sb_head_way;
        rd_req_wdata = sb_head_data;
        if (rd_req_ready) begin
          sb_pop     = 1'b1;
          ev_o.drain = 1'b1;
          state_d    = S_DRAIN_WAIT;
        end
      end
      S_DRAIN_WAIT: begin
        if (rd_done) state_d = ret_q;
      end

      default: state_d = S_IDLE;
    endcase
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      ret_q   <= S_IDLE;
      swap_q  <= 1'b0;
      hreg_q  <= REG_READ;
    end else begin
      state_q <= state_d;
      ret_q   <= ret_d;
      if (state_q == S_LOOKUP && state_d == S_HIT_WAIT) begin
        hreg_q <= hit_in_wr ? REG_WRITE : REG_READ;
        swap_q <= !right_reg && cnt_swap;
      end
    end
  end

  always_ff @(posedge clk) begin
    unique case (state_q)
      S_IDLE: if (req_valid) begin
        op_q    <= req_op;
        addr_q  <= req_addr;
        wdata_q <= req_wdata;
        wmask_q <= req_wmask;
      end
      S_LOOKUP: if (!sb_chk_hit) begin
        if (hit_any) begin
          // swap partners: A is the hit line, the partner is the LRU line opposite
          if (hit_in_wr) begin
            w_way_q   <= wt_way;
            y_valid_q <= 1'b1;
            y_dirty_q <= wt_dirty || (op_q == OP_STORE);
            y_tag_q   <= tag_q;
            r_way_q   <= rt_vic_way;
            x_valid_q <= rt_vic_valid;
            x_dirty_q <= rt_vic_dirty;
            x_tag_q   <= rt_vic_tag;
          end else begin
            r_way_q   <= rt_way;
            x_valid_q <= 1'b1;
            x_dirty_q <= rt_dirty || (op_q == OP_STORE);
            x_tag_q   <= tag_q;
            w_way_q   <= wt_vic_way;
            y_valid_q <= wt_vic_valid;
            y_dirty_q <= wt_vic_dirty;
            y_tag_q   <= wt_vic_tag;
          end
        end else begin
          r_way_q     <= rt_vic_way;
          w_way_q     <= wt_vic_way;
          vic_tag_q   <= (op_q == OP_LOAD) ? rt_vic_tag   : wt_vic_tag;
        end
      end
      S_HIT_WAIT:    if (hreg_q == REG_WRITE ? wd_done : rd_done)
                       line_q <= (hreg_q == REG_WRITE) ? wd_rdata : rd_rdata;
      S_SW_RDR_WAIT: if (rd_done) line_q <= rd_rdata;
      S_WB_RD_WAIT:  if ((op_q == OP_LOAD) ? rd_done : wd_done)
                       line_q <= (op_q == OP_LOAD) ? rd_rdata : wd_rdata;
      S_MISS_WAIT:   if (mem_resp_valid)
                       line_q <= (op_q == OP_STORE) ? merge_line(mem_resp_rdata, wdata_q, wmask_q)
                                                    : mem_resp_rdata;
      default: ;
    endcase
  end

  a_regions_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_LOOKUP) |-> !(rt_hit && wt_hit));
  a_sb_push_not_full: assert property (@(posedge clk) disable iff (!rst_n)
    sb_push |-> !sb_full);
endmodule
