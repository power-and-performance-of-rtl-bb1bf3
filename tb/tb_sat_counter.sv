// tb_sat_counter: exhaustive test of the saturating-counter update rule.
//
// Drives every stored value with every combination of init/inc/dec into the default 2-bit
// counter (start value 11) and into a 3-bit counter with start value 101, and compares the
// new value and the swap request with a reference written from the rule: init loads the
// start value; inc adds one up to the maximum; dec subtracts one down to zero, and asks for
// a swap when the result's top bit is 0. It also walks the default counter through the
// sequence the policy relies on: from 11, two wrong-region hits in a row request a swap, and
// a right-region hit in between prevents it.
`timescale 1ns/1ps
module tb_sat_counter;
  logic [1:0] c2_i, c2_o;
  logic [2:0] c3_i, c3_o;
  logic init, inc, dec, sw2, sw3;
  int checks = 0, failures = 0;

  sat_counter #(.CNT_W(2)) dut2 (.cnt_i(c2_i), .init_i(init), .inc_i(inc), .dec_i(dec),
                                 .cnt_o(c2_o), .swap_o(sw2));
  sat_counter #(.CNT_W(3), .CNT_INIT(3'b101)) dut3 (.cnt_i(c3_i), .init_i(init), .inc_i(inc),
                                 .dec_i(dec), .cnt_o(c3_o), .swap_o(sw3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_next(int v, int w, int init_v, bit i, bit up, bit dn, output bit sw);
    int mx = (1 << w) - 1;
    sw = 0;
    if (i) return init_v;
    if (up) return (v == mx) ? mx : v + 1;
    if (dn) begin
      int n = (v == 0) ? 0 : v - 1;
      sw = ((n >> (w - 1)) & 1) == 0;
      return n;
    end
    return v;
  endfunction

  task automatic step(int v2, int v3, bit i, bit u, bit d);
    int e2, e3; bit es2, es3;
    c2_i = 2'(v2); c3_i = 3'(v3); init = i; inc = u; dec = d;
    #1;
    e2 = ref_next(v2, 2, 3, i, u, d, es2);
    e3 = ref_next(v3, 3, 5, i, u, d, es3);
    check(int'(c2_o) == e2 && sw2 == es2, $sformatf("2-bit v=%0d i=%0b u=%0b d=%0b -> %0d/%0b", v2, i, u, d, c2_o, sw2));
    check(int'(c3_o) == e3 && sw3 == es3, $sformatf("3-bit v=%0d i=%0b u=%0b d=%0b -> %0d/%0b", v3, i, u, d, c3_o, sw3));
  endtask

  initial begin
    for (int v = 0; v < 8; v++)
      for (int k = 0; k < 8; k++)
        step(v % 4, v, k[2], k[1], k[0]);
    // policy sequence on the 2-bit counter
    c2_i = 2'b11; init = 0; inc = 0; dec = 1; #1;
    check(c2_o == 2'b10 && !sw2, "first wrong hit from 11 gives 10, no swap");
    c2_i = c2_o; #1;
    check(c2_o == 2'b01 && sw2, "second wrong hit gives 01 and a swap");
    c2_i = 2'b10; dec = 0; inc = 1; #1;
    check(c2_o == 2'b11 && !sw2, "right hit in between restores 11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
