// tb_pram_l3: random test of the PRAM L3 with a reference memory image.
//
// A 4-set, 2-way L3 with the PRAM latencies (read 40, write 200) sits in front of a
// 30-cycle memory model. The testbench plays the L2: random whole-line reads and
// write-backs over 16 lines, more than the 8 the L3 holds. Checked: every read returns the
// reference line (initial memory content overwritten by every earlier write-back); a read
// hit answers exactly RD_LAT+2 cycles after it was accepted (accept, lookup, array); after
// the run every line is read once more, so lines evicted dirty must come back from memory
// with their last data; memory sees exactly one write per dirty eviction. Hits, misses and
// dirty write-backs must all occur.
`timescale 1ns/1ps
module tb_pram_l3;
  import rwhca_pkg::*;
  import tb_util_pkg::*;
  localparam int unsigned ADDR_W = 40, SETS = 4, WAYS = 2, RD_LAT = 40, WR_LAT = 200;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic up_req_valid = 0, up_req_ready, up_req_we = 0, up_resp_valid;
  logic [ADDR_W-1:0] up_req_addr = '0;
  line_t up_req_wdata = '0, up_resp_rdata;
  logic dn_req_valid, dn_req_ready, dn_req_we, dn_resp_valid;
  logic [ADDR_W-1:0] dn_req_addr;
  line_t dn_req_wdata, dn_resp_rdata;
  logic ev_hit_o, ev_miss_o, ev_writeback_o;

  pram_l3 #(.ADDR_W(ADDR_W), .SETS(SETS), .WAYS(WAYS), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) dut (.*);

  mem_model #(.ADDR_W(ADDR_W), .LAT(30)) u_mem (
    .clk, .req_valid(dn_req_valid), .req_ready(dn_req_ready), .req_we(dn_req_we),
    .req_addr(dn_req_addr), .req_wdata(dn_req_wdata),
    .resp_valid(dn_resp_valid), .resp_rdata(dn_resp_rdata)
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

  int n_hit = 0, n_miss = 0, n_wb = 0;
  always @(negedge clk) if (rst_n) begin
    if (ev_hit_o) n_hit++;
    if (ev_miss_o) n_miss++;
    if (ev_writeback_o) n_wb++;
  end

  function automatic logic [ADDR_W-1:0] pool_addr(int unsigned i);
    return ADDR_W'((longint'(i / SETS) + 5) << (OFFSET_W + $clog2(SETS)))
         | ADDR_W'(longint'(i % SETS) << OFFSET_W);
  endfunction

  task automatic do_req(bit we, logic [ADDR_W-1:0] a, line_t d);
    longint unsigned t_acc;
    bit hit;
    up_req_valid = 1; up_req_we = we; up_req_addr = a; up_req_wdata = d;
    while (!up_req_ready) @(negedge clk);
    t_acc = cyc;
    @(negedge clk);
    up_req_valid = 0;
    hit = ev_hit_o;
    if (we) begin
      ref_img[longint'(a >> OFFSET_W)] = d;
      @(negedge clk);
      while (!up_req_ready) @(negedge clk);
    end else begin
      while (!up_resp_valid) @(negedge clk);
      check(up_resp_rdata == ref_line(longint'(a >> OFFSET_W)), "read data");
      if (hit) check(cyc - t_acc == RD_LAT + 2, $sformatf("read hit latency %0d", cyc - t_acc));
      @(negedge clk);
      while (!up_req_ready) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 600; n++)
      do_req($urandom_range(2) == 0, pool_addr($urandom_range(15)), rand_line());
    // read every line once more
    for (int i = 0; i < 16; i++) do_req(0, pool_addr(i), '0);
    check(n_hit > 0 && n_miss > 0 && n_wb > 0,
          $sformatf("hits %0d misses %0d write-backs %0d", n_hit, n_miss, n_wb));
    $display("L3: hits=%0d misses=%0d writebacks=%0d mem writes=%0d", n_hit, n_miss, n_wb, u_mem.writes);
    check(u_mem.writes == n_wb, "one memory write per write-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
