// tb_ref_pkg: reference models used by the testbenches of the fracture
// detection front end. They are written from the arithmetic definitions
// (floating-point carrier formula, coefficient sums evaluated with floor
// division, integer square root by search), not from the RTL structure.
package tb_ref_pkg;

  // carrier sample k (k = 0..19): round(31*sin(2*pi*0.15*(k+1)))
  function automatic int sin_ref(int k);
    real v = 31.0 * $sin(2.0 * 3.14159265358979 * 0.15 * real'(k % 20 + 1));
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int cos_ref(int k);
    real v = 31.0 * $cos(2.0 * 3.14159265358979 * 0.15 * real'(k % 20 + 1));
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // floor(a / 2^s) for signed a
  function automatic longint fdiv(longint a, int s);
    longint d = longint'(1) <<< s;
    longint q = a / d;
    if ((a % d) != 0 && a < 0) q = q - 1;
    return q;
  endfunction

  // state of one IIR low-pass (direct form II, FRAC = 6 fractional bits)
  typedef struct { longint w1; longint w2; } iir_state_t;

  // returns the filter output for input x and advances the state
  function automatic int iir_ref(ref iir_state_t st, input int x, input int gain_log2 = 0);
    longint a1 = fdiv(st.w1, 0) + fdiv(st.w1, 2) + fdiv(st.w1, 4) + fdiv(st.w1, 5)
               + fdiv(st.w1, 8) + fdiv(st.w1, 10);
    longint a2 = fdiv(st.w2, 1) + fdiv(st.w2, 7) + fdiv(st.w2, 8) + fdiv(st.w2, 9)
               + fdiv(st.w2, 10);
    longint w  = longint'(x) * 64 + a1 - a2;
    longint y  = w + 2 * st.w1 + st.w2;
    longint g  = fdiv(y, 5) + fdiv(y, 7) + fdiv(y, 9) + fdiv(y, 12);
    longint o  = fdiv(g * (longint'(1) <<< gain_log2), 6);
    st.w2 = st.w1;
    st.w1 = w;
    if (o > 2047)  o = 2047;
    if (o < -2048) o = -2048;
    return int'(o);
  endfunction

  function automatic int isqrt(longint x);
    longint r = longint'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return int'(r);
  endfunction

endpackage
