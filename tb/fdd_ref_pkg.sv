// fdd_ref_pkg: reference models used by the testbenches.
//
// Plain integer models of each stage of the fault detection core, written
// from the algorithm (lifting equations, mean of squares, LMS rule, frame
// count, LFSR polynomial) with ordinary multiplications and 64-bit integers,
// so they do not share code with the RTL. Each model is fed one value at a
// time, in the order the hardware sees them.
package fdd_ref_pkg;

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // 9/7 lifting, constants with 12 fractional bits, 4 guard bits.
  class dwt_ref;
    longint e_prev, o_prev, d1_prev, a1_prev, d2_prev, even_cur;
    bit     have_even;
    longint a, d;
    static function longint cm(longint v, longint c);
      return (v * c) >>> 12;
    endfunction
    static function longint wrap24(longint v);
      longint m;
      m = v & 64'hff_ffff;
      return (m >= 64'h80_0000) ? m - 64'h100_0000 : m;
    endfunction
    function new();
      e_prev = 0; o_prev = 0; d1_prev = 0; a1_prev = 0; d2_prev = 0;
      even_cur = 0; have_even = 0; a = 0; d = 0;
    endfunction
    // returns 1 when a coefficient pair is produced
    function bit push(int sample);
      longint x, d1, a1, d2, a2;
      x = longint'(sample) * 16;
      if (!have_even) begin
        even_cur = x; have_even = 1; return 0;
      end
      have_even = 0;
      d1 = wrap24(o_prev + cm(wrap24(e_prev + even_cur), -6497));
      a1 = wrap24(e_prev + cm(wrap24(d1_prev + d1), -217));
      d2 = wrap24(d1_prev + cm(wrap24(a1_prev + a1), 3616));
      a2 = wrap24(a1_prev + cm(wrap24(d2_prev + d2), 1817));
      a = sat16(cm(a2, 4709) >>> 4);
      d = sat16(cm(d2, 3563) >>> 4);
      e_prev = even_cur; o_prev = x; d1_prev = d1; a1_prev = a1; d2_prev = d2;
      return 1;
    endfunction
  endclass

  // Mean of the last 2**lg squares (11 fractional bits).
  class power_ref;
    longint win[$];
    int     lg;
    function new(int log2_len = 1);
      lg = log2_len;
      win.delete();
      for (int i = 0; i < (1 << lg); i++) win.push_back(0);
    endfunction
    function longint push(longint x);
      longint s;
      void'(win.pop_back());
      win.push_front((x * x) >>> 11);
      s = 0;
      foreach (win[i]) s += win[i];
      return sat16(s >>> lg);
    endfunction
  endclass

  // 5-tap LMS predictor, weights with 20 fractional bits in 24 bits.
  class lms_ref;
    longint taps[5];
    longint w[5];
    longint y, e;
    function new();
      foreach (taps[i]) begin taps[i] = 0; w[i] = 0; end
    endfunction
    function void push(longint x, longint d, longint mu);
      longint acc;
      for (int i = 4; i > 0; i--) taps[i] = taps[i-1];
      taps[0] = x;
      acc = 0;
      for (int i = 0; i < 5; i++) acc += w[i] * taps[i];
      y = sat16(acc >>> 20);
      e = sat16(d - y);
      for (int i = 0; i < 5; i++) begin
        w[i] += (mu * e * taps[i]) >>> 13;
        if (w[i] > 8388607) w[i] = 8388607;
        if (w[i] < -8388608) w[i] = -8388608;
      end
    endfunction
  endclass

  // Flags |e| > 0.25 and counts them per frame of n samples.
  class fdi_ref;
    int n, k, cnt, value;
    function new(int frame);
      n = frame; k = 0; cnt = 0; value = 0;
    endfunction
    // returns 1 at the end of a frame
    function bit push(longint e);
      longint m;
      m = (e < 0) ? -e : e;
      if (m > 512) cnt++;
      k++;
      if (k == n) begin
        value = (cnt > 255) ? 255 : cnt;
        k = 0; cnt = 0;
        return 1;
      end
      return 0;
    endfunction
  endclass

  // x^8+x^6+x^5+x^4+1 LFSR with seed stepping, modelled by sequence index.
  class tpg_ref;
    bit [7:0] state, seed;
    int       seqs;
    function new();
      state = 8'h01; seed = 8'h01; seqs = 0;
    endfunction
    function int value();
      return int'(state) * 8;
    endfunction
    function void step();
      bit [7:0] nx;
      nx = {state[6:0], ^(state & 8'b1011_1000)};
      if (nx == seed) begin
        seed  = (seed == 8'hff) ? 8'h01 : seed + 8'h01;
        state = seed;
        seqs++;
      end else state = nx;
    endfunction
  endclass

endpackage
