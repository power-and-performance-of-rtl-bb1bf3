// sat_counter: update rule of the per-line saturating counter of the hybrid cache.
//
// Every line carries a small saturating counter. It is set to CNT_INIT (binary 11 for the
// 2-bit counter) when the line is allocated or moved by a swap. A hit in the "right" region
// (a load in the read region or a store in the write region) increments it, saturating at
// the maximum; a hit in the "wrong" region decrements it, saturating at zero. When a
// decrement leaves the counter's most significant bit at 0 the line has seen consecutive
// wrong-region hits and must be swapped into the opposite region ('swap' output).
// With the default 2-bit counter starting at 11, the second consecutive wrong-region hit
// triggers a swap. The counter width and the initial value are parameters because the
// threshold and the start value may be tuned to the read/write ratio of the workload; the
// swap test is always "MSB is 0 after a decrement".
//
// Purely combinational: cnt_i is the stored value, cnt_o the value to write back.
// init_i takes priority over inc_i/dec_i.
// The rule follows the RWHCA design; saturation bounds and input priority are this
// implementation's choices.
module sat_counter #(
  parameter int unsigned CNT_W    = 2,
  parameter logic [CNT_W-1:0] CNT_INIT = '1
) (
  input  logic [CNT_W-1:0] cnt_i,
  input  logic             init_i,  // line allocated or swapped
  input  logic             inc_i,   // hit in the right region
  input  logic             dec_i,   // hit in the wrong region
  output logic [CNT_W-1:0] cnt_o,
  output logic             swap_o   // decrement left the MSB at 0
);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  always_comb begin
    cnt_o  = cnt_i;
    swap_o = 1'b0;
    if (init_i) begin
      cnt_o = CNT_INIT;
    end else if (inc_i) begin
      if (cnt_i != CNT_MAX) cnt_o = cnt_i + 1'b1;
    end else if (dec_i) begin
      if (cnt_i != '0) cnt_o = cnt_i - 1'b1;
      swap_o = ~cnt_o[CNT_W-1];
    end
  end
endmodule
