// tb_region_data_array: test of one region's data array and its access timing.
//
// A small array (8 sets x 3 ways) with read latency 5 and write latency 9 is filled with
// random lines through random byte masks and read back, against a reference copy kept in the
// testbench. Every access checks that ready drops while the region is busy and that done
// arrives exactly the configured number of cycles after the accepting cycle. A second
// instance with the write-region latency of 6/6 checks the SRAM timing.
`timescale 1ns/1ps
module tb_region_data_array;
  import rwhca_pkg::*;
  import tb_util_pkg::*;
  localparam int SETS = 8, WAYS = 3, RL = 5, WL = 9;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic req_valid = 0, req_ready, req_we = 0, done;
  logic [2:0] req_set = 0;
  logic [1:0] req_way = 0;
  line_t wdata = '0, rdata;
  bmask_t wmask = '0;
  logic s_valid = 0, s_ready, s_done;
  line_t s_rdata;

  region_data_array #(.SETS(SETS), .WAYS(WAYS), .RD_LAT(RL), .WR_LAT(WL)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_set, .req_way, .req_wdata(wdata),
    .req_wmask(wmask), .done_o(done), .rdata_o(rdata));
  region_data_array #(.SETS(4), .WAYS(1), .RD_LAT(6), .WR_LAT(6)) dut_sram (
    .clk, .rst_n, .req_valid(s_valid), .req_ready(s_ready), .req_we(1'b0), .req_set(2'd1),
    .req_way(1'b0), .req_wdata('0), .req_wmask('0), .done_o(s_done), .rdata_o(s_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  line_t ref_mem [SETS*WAYS];
  bit    known   [SETS*WAYS];

  task automatic access(bit we, int s, int w, line_t d, bmask_t m, output line_t q);
    int t0;
    @(negedge clk);
    req_valid = 1; req_we = we; req_set = 3'(s); req_way = 2'(w); wdata = d; wmask = m;
    check(req_ready, "ready while idle");
    t0 = cyc;
    @(negedge clk);
    req_valid = 0;
    check(!req_ready, "ready low while busy");
    while (!done) @(negedge clk);
    check(cyc - t0 == (we ? WL : RL), $sformatf("latency %0d", cyc - t0));
    q = rdata;
  endtask

  initial begin
    line_t q, d;
    bmask_t m;
    int idx;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initialise every line fully
    for (int i = 0; i < SETS*WAYS; i++) begin
      d = rand_line();
      access(1, i / WAYS, i % WAYS, d, '1, q);
      ref_mem[i] = d; known[i] = 1;
    end
    for (int n = 0; n < 300; n++) begin
      idx = $urandom_range(SETS*WAYS-1);
      if ($urandom_range(1)) begin
        d = rand_line(); m = rand_mask();
        access(1, idx / WAYS, idx % WAYS, d, m, q);
        check(q == ref_mem[idx], "write returns the old line");
        ref_mem[idx] = merge_line(ref_mem[idx], d, m);
      end else begin
        access(0, idx / WAYS, idx % WAYS, '0, '0, q);
        check(q == ref_mem[idx], $sformatf("read data of line %0d", idx));
      end
    end
    // SRAM-timed instance: done 6 cycles after the request
    begin
      int t0;
      @(negedge clk); s_valid = 1; t0 = cyc;
      @(negedge clk); s_valid = 0;
      while (!s_done) @(negedge clk);
      check(cyc - t0 == 6, "SRAM region latency 6");
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
