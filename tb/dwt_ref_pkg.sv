// dwt_ref_pkg: reference model of the one-level (9,7) 2-D DWT used by the
// testbenches. It transforms whole signals held in arrays, with explicit
// whole-sample symmetric extension (x(-i) = x(i), x(L-1+i) = x(L-1-i)) and
// the same fixed-point rules as the hardware (coefficient products floored to
// 12 fractional bits, every value wrapped to a 16-bit signed word), but with
// none of the hardware's streaming, registers or boundary flags. n_wrap counts
// the values that overflowed the word, so a test can show that none did.
package dwt_ref_pkg;

  localparam longint A  = -6497;
  localparam longint B  = -217;
  localparam longint G  =  3616;
  localparam longint D  =  1817;
  localparam longint KH =  5039;
  localparam longint KL =  3330;

  // number of values that did not fit the 16-bit word
  int unsigned n_wrap = 0;

  function automatic longint wrap16(input longint v);
    longint w;
    w = v & 64'hFFFF;
    w = (w >= 32768) ? w - 65536 : w;
    if (w != v) n_wrap++;
    return w;
  endfunction

  function automatic longint cmul(input longint c, input longint v);
    return (c * v) >>> 12;
  endfunction

  function automatic int mir(input int i, input int len);
    if (i < 0)    return -i;
    if (i >= len) return 2*(len-1) - i;
    return i;
  endfunction

  // One-level forward transform of x (even length): lo[n], hi[n], n < len/2.
  function automatic void fwd97(input longint x[], output longint lo[], output longint hi[]);
    int     len;
    longint y[];
    len = x.size();
    y   = new[len];
    foreach (x[i]) y[i] = wrap16(x[i]);
    for (int i = 1; i < len; i += 2) y[i] = wrap16(y[i] + cmul(A, y[i-1] + y[mir(i+1, len)]));
    for (int i = 0; i < len; i += 2) y[i] = wrap16(y[i] + cmul(B, y[mir(i-1, len)] + y[mir(i+1, len)]));
    for (int i = 1; i < len; i += 2) y[i] = wrap16(y[i] + cmul(G, y[i-1] + y[mir(i+1, len)]));
    for (int i = 0; i < len; i += 2) y[i] = wrap16(y[i] + cmul(D, y[mir(i-1, len)] + y[mir(i+1, len)]));
    lo = new[len/2];
    hi = new[len/2];
    for (int n = 0; n < len/2; n++) begin
      lo[n] = wrap16(cmul(KL, y[2*n]));
      hi[n] = wrap16(cmul(KH, y[2*n+1]));
    end
  endfunction

endpackage
