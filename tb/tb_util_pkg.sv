// tb_util_pkg: helpers shared by the hybrid-cache testbenches.
//
// init_line gives the content that main memory holds for a line that was never written:
// every 32-bit word is a mix of the line address and the word number, so that two lines,
// or two words of one line, never look alike. The memory model and the testbench reference
// models use the same function, computed independently of the design.
package tb_util_pkg;
  import rwhca_pkg::*;

  function automatic line_t init_line(longint unsigned laddr);
    line_t l;
    for (int i = 0; i < LINE_BITS/32; i++)
      l[i*32 +: 32] = 32'(laddr * 32'h9E37_79B9) ^ (32'(i) * 32'h0101_0101) ^ 32'h5A5A_0000;
    return l;
  endfunction

  function automatic line_t rand_line();
    line_t l;
    for (int i = 0; i < LINE_BITS/32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  function automatic bmask_t rand_mask();
    bmask_t m;
    for (int i = 0; i < LINE_BYTES/32; i++) m[i*32 +: 32] = $urandom;
    return m;
  endfunction
endpackage
