// tb_sc_model_pkg: reference models used by the testbenches, written
// independently of the RTL.
//
// - lfsr8_next: x^8+x^6+x^5+x^4+1 LFSR shifting left, written out bit by bit.
// - sobol_at: the t-th value of the one-dimensional K-bit Sobol sequence in
//   Gray-code order, which equals the bit reversal of gray(t).
// - rev: bit reversal of a K-bit value.
// - sel_index: the inner-product selector, i.e. the index i with
//   thr[i-1] <= r < thr[i] (thr[-1] = 0), or -1 when there is none.
// - abs_out / abs_next: the 16-state absolute-value FSM.
package tb_sc_model_pkg;

  function automatic logic [7:0] lfsr8_next(logic [7:0] r);
    logic fb;
    fb = r[7] ^ r[5] ^ r[4] ^ r[3];
    return {r[6:0], fb};
  endfunction

  function automatic int unsigned rev(int unsigned v, int unsigned k);
    int unsigned o;
    o = 0;
    for (int unsigned b = 0; b < k; b++) if (v & (1 << b)) o |= 1 << (k - 1 - b);
    return o;
  endfunction

  function automatic int unsigned sobol_at(int unsigned t, int unsigned k);
    int unsigned tt, g;
    tt = t % (1 << k);
    g  = tt ^ (tt >> 1);
    return rev(g, k);
  endfunction

  function automatic int sel_index(int unsigned r, int unsigned thr [], int n);
    int unsigned lo;
    lo = 0;
    for (int i = 0; i < n; i++) begin
      if (r >= lo && r < thr[i]) return i;
      lo = thr[i];
    end
    return -1;
  endfunction

  function automatic bit abs_out(int unsigned s, int unsigned ns);
    if (s < ns / 2) return (s % 2) == 0;
    else            return (s % 2) == 1;
  endfunction

  function automatic int unsigned abs_next(int unsigned s, bit x, int unsigned ns);
    if (x)  return (s == ns - 1) ? s : s + 1;
    else    return (s == 0) ? s : s - 1;
  endfunction

  // Rounded threshold of a running sum: round(cum * 2^k / total).
  function automatic int unsigned thr_of(int unsigned cum, int unsigned total, int unsigned k);
    real v;
    v = real'(cum) * real'(1 << k) / real'(total);
    return int'($floor(v + 0.5));
  endfunction

endpackage
