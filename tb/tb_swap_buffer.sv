// tb_swap_buffer: test of the swap buffer's FIFO order, fill state and associative checks.
//
// A 4-entry buffer receives random pushes and pops (never past full or empty, which the
// buffer asserts against) while a queue in the testbench models its content. Checked every
// cycle: full/empty/count, the head entry's set, way and line, the snoop check for a random
// line address (hit exactly when a held entry has that address) and the set check (hit
// exactly when a held entry belongs to that set). Simultaneous push and pop are included.
`timescale 1ns/1ps
module tb_swap_buffer;
  import rwhca_pkg::*;
  import tb_util_pkg::*;
  localparam int DEPTH = 4, LADDR_W = 10, SET_W = 3, WAY_W = 2;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic push_valid = 0, pop = 0, full_o, empty_o, snoop_hit, chk_hit;
  logic [LADDR_W-1:0] push_laddr = 0, snoop_laddr = 0;
  logic [SET_W-1:0] push_set = 0, head_set, chk_set = 0;
  logic [WAY_W-1:0] push_way = 0, head_way;
  line_t push_data = '0, head_data;
  logic [$clog2(DEPTH+1)-1:0] count_o;

  swap_buffer #(.DEPTH(DEPTH), .LADDR_W(LADDR_W), .SET_W(SET_W), .WAY_W(WAY_W)) dut (.*);

  typedef struct { logic [LADDR_W-1:0] la; logic [SET_W-1:0] s; logic [WAY_W-1:0] w; line_t d; } ent_t;
  ent_t q [$];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_full = 0, n_both = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit sh, ch;
      // combinational checks on the present content
      snoop_laddr = LADDR_W'($urandom_range(31));
      chk_set     = SET_W'($urandom);
      #0.1;
      sh = 0; ch = 0;
      foreach (q[i]) begin
        if (q[i].la == snoop_laddr) sh = 1;
        if (q[i].s == chk_set) ch = 1;
      end
      check(int'(count_o) == q.size() && full_o == (q.size() == DEPTH) && empty_o == (q.size() == 0),
            "count / full / empty");
      check(snoop_hit == sh, "snoop check");
      check(chk_hit == ch, "set check");
      if (q.size() > 0)
        check(head_set == q[0].s && head_way == q[0].w && head_data == q[0].d, "head entry");
      if (q.size() == DEPTH) n_full++;
      // next operation
      push_valid = (q.size() < DEPTH) && ($urandom_range(2) != 0);
      pop        = (q.size() > 0) && ($urandom_range(2) != 0);
      push_laddr = LADDR_W'($urandom_range(31));
      push_set = SET_W'($urandom); push_way = WAY_W'($urandom); push_data = rand_line();
      if (push_valid && pop) n_both++;
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push_valid) q.push_back('{push_laddr, push_set, push_way, push_data});
      push_valid = 0; pop = 0;
    end
    check(n_full > 0 && n_both > 0, "buffer reached full and saw push with pop");
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
