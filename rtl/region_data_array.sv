// region_data_array: data array of one region of the hybrid cache, with the access
// latency of the region's memory technology.
//
// The array holds SETS x WAYS lines of 128 bytes. Each way is one bank; all banks of a
// region share the region's single read/write port, so the region serves one access at a
// time. The storage is modelled as an array; the technology shows only in the timing:
// a read completes RD_LAT cycles and a write WR_LAT cycles after the cycle in which the
// request was accepted (SRAM write region: 6/6, STT-MRAM read region: 20/60 at 4 GHz).
// A write merges the bytes selected by wmask into the stored line.
//
// Interface: req_valid/req_ready handshake (ready is high whenever the region is idle);
// done_o pulses for one cycle when the access completes, with rdata_o holding the line for
// a read (the line as it was before the write, for a write). The array content is not
// reset: a line is only read after the tag array has marked it valid.
// The latencies and the single port per region follow the RWHCA configuration; the
// handshake is this implementation's own.
module region_data_array
  import rwhca_pkg::*;
#(
  parameter int unsigned SETS   = 2048,
  parameter int unsigned WAYS   = 15,
  parameter int unsigned RD_LAT = 20,
  parameter int unsigned WR_LAT = 60,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_we,
  input  logic [SET_W-1:0] req_set,
  input  logic [WAY_W-1:0] req_way,
  input  line_t            req_wdata,
  input  bmask_t           req_wmask,
  output logic             done_o,
  output line_t            rdata_o
);
  localparam int unsigned LAT_MAX = (RD_LAT > WR_LAT) ? RD_LAT : WR_LAT;
  localparam int unsigned CNT_W   = $clog2(LAT_MAX + 1);

  line_t mem [SETS*WAYS];

  logic             busy_q;
  logic [CNT_W-1:0] cnt_q;
  line_t            rdata_q;

  wire accept = req_valid && req_ready;
  localparam int unsigned IDX_W = $clog2(SETS*WAYS);
  wire [IDX_W-1:0] idx = IDX_W'(req_set) * IDX_W'(WAYS) + IDX_W'(req_way);

  assign req_ready = ~busy_q;
  assign done_o    = busy_q && (cnt_q == '0);
  assign rdata_o   = rdata_q;

  always_ff @(posedge clk) begin
    if (accept) begin
      rdata_q <= mem[idx];
      if (req_we) mem[idx] <= merge_line(mem[idx], req_wdata, req_wmask);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
    end else if (accept) begin
      busy_q <= 1'b1;
      cnt_q  <= req_we ? CNT_W'(WR_LAT - 1) : CNT_W'(RD_LAT - 1);
    end else if (busy_q) begin
      if (cnt_q == '0) busy_q <= 1'b0;
      else             cnt_q  <= cnt_q - 1'b1;
    end
  end

  // The index must stay inside the array.
  a_way_range: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> (int'(req_way) < WAYS));
endmodule
