// mem_model: behavioural main memory for the hybrid-cache testbenches (not synthesizable).
//
// Serves one line request at a time. A write is stored at once and frees the port on the
// next cycle; a read returns the line LAT cycles after it was accepted, as a one-cycle
// resp_valid pulse. Lines never written read as tb_util_pkg::init_line(line address).
// The default latency is the 400 core cycles of the evaluated system's main memory.
module mem_model
  import rwhca_pkg::*;
  import tb_util_pkg::*;
#(
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned LAT    = 400
) (
  input  logic              clk,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  line_t             req_wdata,
  output logic              resp_valid,
  output line_t             resp_rdata
);
  line_t store [longint unsigned];
  int    busy = 0;
  int    writes = 0;
  int    reads  = 0;

  initial begin
    req_ready  = 1'b1;
    resp_valid = 1'b0;
    resp_rdata = '0;
  end

  function automatic line_t peek(longint unsigned laddr);
    return store.exists(laddr) ? store[laddr] : init_line(laddr);
  endfunction

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (busy > 0) begin
      busy <= busy - 1;
      if (busy == 1) begin
        resp_valid <= 1'b1;
        req_ready  <= 1'b1;
      end
    end else if (req_valid && req_ready) begin
      if (req_we) begin
        store[longint'(req_addr >> OFFSET_W)] = req_wdata;
        writes++;
      end else begin
        resp_rdata <= peek(longint'(req_addr >> OFFSET_W));
        busy       <= LAT;
        req_ready  <= 1'b0;
        reads++;
      end
    end
  end
endmodule
