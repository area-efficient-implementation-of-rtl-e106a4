// tb_util_pkg: reference arithmetic shared by the testbenches.
//
// Computes Q1.14 phasors exp(j*2*pi*num/den) with rounding (the value +1.0
// saturates to 16383) and saturates integers to a given width, independently
// of the RTL.
package tb_util_pkg;

  function automatic longint ph_re(int num, int den);
    longint c;
    c = longint'($floor($cos(2.0 * 3.14159265358979323846 * num / den) * 16384.0 + 0.5));
    return (c > 16383) ? 16383 : c;
  endfunction

  function automatic longint ph_im(int num, int den);
    longint s;
    s = longint'($floor($sin(2.0 * 3.14159265358979323846 * num / den) * 16384.0 + 0.5));
    return (s > 16383) ? 16383 : s;
  endfunction

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (longint'(1) <<< (w - 1)) - 1;
    mn = -(longint'(1) <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  // Floor division by 2**s (arithmetic shift right).
  function automatic longint asr(longint v, int s);
    return v >>> s;
  endfunction

  // Random signed value of w bits.
  function automatic longint rnd(int w);
    longint v;
    v = longint'($urandom) & ((longint'(1) <<< w) - 1);
    if (v >= (longint'(1) <<< (w - 1))) v -= (longint'(1) <<< w);
    return v;
  endfunction

endpackage
