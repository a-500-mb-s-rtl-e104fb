// sova_ref_pkg: bit-true behavioural reference of the soft-output Viterbi
// decoder, used by the testbenches. It runs the Viterbi recursion on plain
// integers (no modulo arithmetic), stores every decision and metric
// difference, and forms each soft output by explicit tracebacks of the
// survivor and of the two competing paths into the ML state, instead of the
// register exchanges and pipelines of the RTL. It also holds the channel and
// encoder models that generate test stimulus.
package sova_ref_pkg;

  localparam int EPR4  = 0;
  localparam int OCT13 = 1;

  function automatic int bip(input int b);
    return b ? 1 : -1;
  endfunction

  // seven-bit sign-magnitude <-> integer (magnitude saturated to 63)
  function automatic logic [6:0] to_sm(input int v);
    int m;
    m = (v < 0) ? -v : v;
    if (m > 63) m = 63;
    return {v < 0, 6'(m)};
  endfunction

  function automatic int from_sm(input logic [6:0] s);
    return s[6] ? -int'(s[5:0]) : int'(s[5:0]);
  endfunction

  class sova_ref;
    int code, L, M, N;
    logic [6:0] samp[$];
    logic [6:0] apri[$];
    int  D[$][8];        // decisions, D[t][j]
    int  best[$];        // best[t]: state with the smallest metric at time t
    int  DL[$][8];       // metric differences, saturated
    int  nsat;           // metric differences that saturated
    int  maxspread;      // largest path-metric spread seen
    int  wraps;          // times the metric of state 0 crossed a 2^12 boundary

    function new(int code, int L, int M);
      this.code = code; this.L = L; this.M = M; N = 0;
      nsat = 0; maxspread = 0; wraps = 0;
    endfunction

    // branch metric, state p = {b[t-3], b[t-2], b[t-1]}, new bit a
    function int bm(int t, int p, int a);
      int y, lev, e, bx;
      if (code == EPR4) begin
        y   = from_sm(samp[t]);
        lev = 8 * (bip(a) + bip(p & 1) - bip((p >> 1) & 1) - bip((p >> 2) & 1));
        e   = (y > lev) ? y - lev : lev - y;
        if (apri[t][6] != ((a ^ p) & 1)) e += apri[t][5:0];
        return e;
      end
      bx = a ^ ((p >> 1) & 1) ^ ((p >> 2) & 1);
      return (samp[t][6] != bx) ? int'(samp[t][5:0]) : 0;
    endfunction

    function void run();
      longint sm[8], nsm[8], c0, c1, mn, mx;
      int row[8], drow[8];
      N = samp.size();
      foreach (sm[i]) sm[i] = (i == 0) ? 0 : 512;   // known start state 0
      best.push_back(0);
      for (int t = 0; t < N; t++) begin
        for (int j = 0; j < 8; j++) begin
          int p0, p1;
          p0 = j >> 1; p1 = (j >> 1) | 4;
          c0 = sm[p0] + bm(t, p0, j & 1);
          c1 = sm[p1] + bm(t, p1, j & 1);
          row[j]  = (c1 < c0);
          drow[j] = (c1 < c0) ? int'(c0 - c1) : int'(c1 - c0);
          if (drow[j] > 63) begin drow[j] = 63; nsat++; end
          nsm[j] = (c1 < c0) ? c1 : c0;
        end
        mn = nsm[0]; mx = nsm[0];
        for (int j = 0; j < 8; j++) begin
          if (nsm[j] < mn) mn = nsm[j];
          if (nsm[j] > mx) mx = nsm[j];
        end
        if (int'(mx - mn) > maxspread) maxspread = int'(mx - mn);
        if ((nsm[0] >> 12) != (sm[0] >> 12)) wraps++;
        sm = nsm;
        begin
          int b; b = 0;
          for (int j = 1; j < 8; j++) if (sm[j] < sm[b]) b = j;
          best.push_back(b);
        end
        D.push_back(row);
        DL.push_back(drow);
      end
    endfunction

    function int dec(int t, int s);
      return (t < 0) ? 0 : D[t][s];
    endfunction

    // state at time x on the survivor of state s at time tau
    function int state_at(int s, int tau, int x);
      for (int t = tau - 1; t >= x; t--) s = (s >> 1) | (dec(t, s) << 2);
      return s;
    endfunction

    function int ml_state(int tau);
      return state_at(best[tau + L], tau + L, tau);
    endfunction

    // trellis bit b[T] on the survivor of state s at time tau (tau >= T+1)
    function int tbit(int s, int tau, int T);
      if (tau < T + 3) return (s >> (tau - T - 1)) & 1;
      return (state_at(s, tau, T + 3) >> 2) & 1;
    endfunction

    // decided bit and reliability of output bit T
    function void soft_bit(int T, output int hard, output int rel);
      int first, i, b0, b1;
      if (code == OCT13) begin
        hard  = (ml_state(T + 3) >> 2) & 1;
        first = T + 4;
      end else begin
        hard  = ((ml_state(T + 3) >> 2) ^ (ml_state(T + 2) >> 2)) & 1;
        first = T + 3;
      end
      rel = 63;
      for (int tau = first; tau < first + M; tau++) begin
        i = ml_state(tau);
        if (code == OCT13) begin
          b0 = tbit(i >> 1, tau - 1, T);
          b1 = tbit((i >> 1) | 4, tau - 1, T);
        end else begin
          b0 = tbit(i >> 1, tau - 1, T) ^ tbit(i >> 1, tau - 1, T - 1);
          b1 = tbit((i >> 1) | 4, tau - 1, T) ^ tbit((i >> 1) | 4, tau - 1, T - 1);
        end
        if (b0 != b1 && tau >= 1 && DL[tau - 1][i] < rel) rel = DL[tau - 1][i];
        if (b0 != b1 && tau < 1) rel = 0;
      end
    endfunction
  endclass

  // ---- stimulus: encoders and channels ----
  // Encoder/channel memories persist across calls, so consecutive calls
  // continue one stream; gen_reset() returns them to state 0.
  int g_a1, g_a2, g_a3, g_u1, g_u2, g_u3;

  function automatic void gen_reset();
    g_a1 = 0; g_a2 = 0; g_a3 = 0; g_u1 = 0; g_u2 = 0; g_u3 = 0;
  endfunction

  // EPR4: u -> precoder a[t] = u[t] ^ a[t-1] -> 8*(a + a1 - a2 - a3) + noise
  function automatic void gen_epr4(input int n, input int noise, input int apmag,
                                   ref int u[$], ref logic [6:0] y[$], ref logic [6:0] ap[$]);
    int a1, a2, a3, a, v, t0;
    a1 = g_a1; a2 = g_a2; a3 = g_a3;
    t0 = u.size();
    for (int t = t0; t < t0 + n; t++) begin
      u.push_back($urandom_range(0, 1));
      a = u[t] ^ a1;
      v = 8 * (bip(a) + bip(a1) - bip(a2) - bip(a3));
      if (noise > 0) v += int'($urandom_range(0, 2 * noise)) - noise;
      y.push_back(to_sm(v));
      if (apmag > 0) ap.push_back(to_sm(($urandom_range(0, 3) == 0 ? 1 : -1) * bip(u[t]) *
                                        int'($urandom_range(0, apmag))));
      else ap.push_back(7'd0);
      a3 = a2; a2 = a1; a1 = a;
    end
    g_a1 = a1; g_a2 = a2; g_a3 = a3;
  endfunction

  // Octal(13): x[t] = u[t] ^ u[t-2] ^ u[t-3], soft value = -+base + noise
  function automatic void gen_oct13(input int n, input int base, input int noise,
                                    ref int u[$], ref logic [6:0] x[$]);
    int u1, u2, u3, c, v, t0;
    u1 = g_u1; u2 = g_u2; u3 = g_u3;
    t0 = u.size();
    for (int t = t0; t < t0 + n; t++) begin
      u.push_back($urandom_range(0, 1));
      c = u[t] ^ u2 ^ u3;
      v = -bip(c) * base;    // soft values: negative (sign bit 1) means bit 1
      if (noise > 0) v += int'($urandom_range(0, 2 * noise)) - noise;
      x.push_back(to_sm(v));
      u3 = u2; u2 = u1; u1 = u[t];
    end
    g_u1 = u1; g_u2 = u2; g_u3 = u3;
  endfunction

endpackage
