// ann_ref_pkg: bit-exact reference arithmetic for the testbenches of the
// neural network unit, written from the number formats alone:
//   words are 18-bit Q6.12 two's complement;
//   a neuron's potential is sum(data*weight) + bias*1.0 kept exactly, then
//   divided by 4096 rounding toward minus infinity and clamped to 18 bits;
//   the sigmoid table entry for interval s (s = -256 .. 255, x = s/8) holds
//   offset = round(4096 / (1 + e^-x)) and gradient = the same value at x+1/8
//   minus offset; the interpolated sigmoid of word x is
//   offset + floor(gradient * (x mod 512) / 512), wrapped to 18 bits.
package ann_ref_pkg;

  function automatic int sig_q12(real x);
    return int'($floor(4096.0 / (1.0 + $exp(-x)) + 0.5));
  endfunction

  // Table contents for memory address a (0 .. 511).
  function automatic int tbl_offset(int a);
    int s = (a >= 256) ? a - 512 : a;
    return sig_q12(real'(s) / 8.0);
  endfunction

  function automatic int tbl_gradient(int a);
    int s = (a >= 256) ? a - 512 : a;
    return sig_q12(real'(s) / 8.0 + 0.125) - tbl_offset(a);
  endfunction

  function automatic int wrap18(longint v);
    longint m = v & 64'h3FFFF;
    return int'((m >= 131072) ? m - 262144 : m);
  endfunction

  function automatic int act_ref(int x);
    int s   = x >>> 9;
    int low = x & 511;
    int a   = (s < 0) ? s + 512 : s;
    longint p = longint'(tbl_gradient(a)) * longint'(low);
    longint q = (p >= 0) ? p / 512 : -((-p + 511) / 512);
    return wrap18(longint'(tbl_offset(a)) + q);
  endfunction

  // Potential from an exact sum of Q12.24 products and bias.
  function automatic int pot_ref(longint acc);
    longint q = (acc >= 0) ? acc / 4096 : -((-acc + 4095) / 4096);
    if (q > 131071)  return 131071;
    if (q < -131072) return -131072;
    return int'(q);
  endfunction

endpackage
