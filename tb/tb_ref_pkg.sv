// tb_ref_pkg: reference arithmetic for the converter testbenches.
//
// ws_ref(j, x) is the value that decimal position j receives from the bits
// of x before any carries: the sum over i of (j-th decimal digit of 2**i)
// times x[i]. It is computed by plain integer division, independently of
// how the hardware splits the sums into look-up tables.
package tb_ref_pkg;

  function automatic int unsigned ws_ref(int unsigned j, logic [15:0] x);
    int unsigned p = 1, s = 0;
    for (int unsigned k = 0; k < j; k++) p *= 10;
    for (int unsigned i = 0; i < 16; i++)
      if (x[i]) s += ((32'd1 << i) / p) % 10;
    return s;
  endfunction

endpackage
