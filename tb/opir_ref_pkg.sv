// opir_ref_pkg: reference arithmetic for the preprocessing testbenches,
// written independently of the RTL with 64-bit integers.
//   y = clamp(floor(((x - mean) * inv_std + 2^(s-1)) / 2^s), -128, 127),
//   s = INV_FRAC - fix_pos.
package opir_ref_pkg;
  import opir_pkg::*;

  function automatic int ref_norm(int xx, int mm, longint inv, int fp);
    longint p, r;
    int s;
    p = longint'(xx - mm) * inv;
    s = int'(INV_FRAC) - fp;
    r = (s > 0) ? ((p + (longint'(1) <<< (s - 1))) >>> s) : p;
    if (r > 127)  return 127;
    if (r < -128) return -128;
    return int'(r);
  endfunction
endpackage
