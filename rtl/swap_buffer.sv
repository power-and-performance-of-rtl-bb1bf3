// swap_buffer: holding buffer for lines on their way into the read region.
//
// A swap between the regions is serialized: the write-region line is first read out into
// this buffer, then the read-region line is copied into the write region, and last the
// buffered line is written into the read region. Because the read region (STT-MRAM) is slow
// to write, that last step is deferred: the buffer keeps up to DEPTH entries in FIFO order
// and the controller drains them when the read region is free, so several swaps can be
// outstanding.
//
// Each entry holds the line, its line address and its destination (set and way) in the read
// region. Two associative checks run on all valid entries: a snoop check by line address
// (a coherence snoop that hits must be answered with retry) and a set check used by the
// controller to wait for pending entries of a set before touching that set.
//
// Interface: push when push_valid && !full_o; head_* show the oldest entry while
// !empty_o; pop removes it. Checks are combinational. Push and pop may happen in the same
// cycle.
// The buffer, its 16-entry default and the snoop retry follow the RWHCA design; FIFO order
// and the set check are choices of this implementation.
module swap_buffer
  import rwhca_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned LADDR_W = 33,   // line address width
  parameter int unsigned SET_W  = 11,
  parameter int unsigned WAY_W  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               push_valid,
  input  logic [LADDR_W-1:0] push_laddr,
  input  logic [SET_W-1:0]   push_set,
  input  logic [WAY_W-1:0]   push_way,
  input  line_t              push_data,
  output logic               full_o,
  output logic               empty_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o,
  input  logic               pop,
  output logic [SET_W-1:0]   head_set,
  output logic [WAY_W-1:0]   head_way,
  output line_t              head_data,
  input  logic [LADDR_W-1:0] snoop_laddr,
  output logic               snoop_hit,
  input  logic [SET_W-1:0]   chk_set,
  output logic               chk_hit
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  logic [DEPTH-1:0]   vld_q;
  logic [LADDR_W-1:0] laddr_q [DEPTH];
  logic [SET_W-1:0]   set_q   [DEPTH];
  logic [WAY_W-1:0]   way_q   [DEPTH];
  line_t              data_q  [DEPTH];
  logic [PTR_W-1:0]   wp_q, rp_q;
  logic [CNT_W-1:0] cnt_q;

  wire do_push = push_valid && !full_o;
  wire do_pop  = pop && !empty_o;

  assign full_o    = (cnt_q == CNT_W'(DEPTH));
  assign empty_o   = (cnt_q == '0);
  assign count_o   = cnt_q;
  assign head_set  = set_q[rp_q];
  assign head_way  = way_q[rp_q];
  assign head_data = data_q[rp_q];

  always_comb begin
    snoop_hit = 1'b0;
    chk_hit   = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (vld_q[i] && laddr_q[i] == snoop_laddr) snoop_hit = 1'b1;
      if (vld_q[i] && set_q[i] == chk_set)       chk_hit   = 1'b1;
    end
  end

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) begin
        vld_q[wp_q] <= 1'b1;
        wp_q        <= next_ptr(wp_q);
      end
      if (do_pop) begin
        vld_q[rp_q] <= 1'b0;
        rp_q        <= next_ptr(rp_q);
      end
      cnt_q <= cnt_q + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      laddr_q[wp_q] <= push_laddr;
      set_q[wp_q]   <= push_set;
      way_q[wp_q]   <= push_way;
      data_q[wp_q]  <= push_data;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push_valid |-> !full_o);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty_o);
endmodule
