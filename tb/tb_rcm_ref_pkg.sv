// tb_rcm_ref_pkg: reference models used by the RCM testbenches.
//
// Everything here is written from the element-level meaning of the three
// precision modes (signed 16-, 8- or 4-bit elements, N products summed),
// not from the chunk-level structure of the RTL.
package tb_rcm_ref_pkg;
  import rcm_pkg::*;

  // Signed value of element e (0 = least significant) of a 16-bit word
  // holding 16/N-bit elements.
  function automatic int elem(logic [15:0] w, int n, int e);
    int bits = 16 / n;
    logic [15:0] v = (w >> (bits * e)) & ((1 << bits) - 1);
    if (v[bits-1]) return int'(v) - (1 << bits);
    return int'(v);
  endfunction

  // Expected ST multiplier output (operation table of the multiplier).
  function automatic logic [31:0] ref_mult(rcm_cfg_e cfg, logic [15:0] a, logic [15:0] b);
    int n = cfg_n(cfg);
    int s = 0;
    // op1 element e (from the top) meets op2 element e (from the bottom)
    for (int e = 0; e < n; e++)
      s += elem(a, n, n - 1 - e) * elem(b, n, e);
    return 32'(s);
  endfunction

  // Sign-extended value of an element stored with `bits` bits.
  function automatic int sext(int v, int bits);
    v = v & ((1 << bits) - 1);
    if (v >= (1 << (bits - 1))) return v - (1 << bits);
    return v;
  endfunction

endpackage
