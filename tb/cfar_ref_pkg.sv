// cfar_ref_pkg: behavioural reference of the CA-CFAR detector for testbenches.
//
// Written straight from the algorithm, not from the RTL's structure: it keeps
// the whole sample history and, for every new sample, recomputes the sum of
// the 2^M reference cells around the cell under test from scratch (O(N) per
// sample), then applies T = ((sum >> M) * K) >> 8 and the strict comparison.
// It also produces samples: complex Gaussian-like noise (sum of four uniform
// values per component) and constant-envelope pulses.
package cfar_ref_pkg;

  class cfar_ref;
    int M, G, NH, WIN, CUT;
    int hi[$];
    int hq[$];
    longint hp[$];
    longint total = 0;   // samples pushed since reset

    function new(int m, int g);
      M = m; G = g;
      NH = 2 ** (m - 1);
      WIN = 2 * NH + 2 * g + 1;
      CUT = NH + g;
    endfunction

    // Pushes one sample; says whether the cell under test leaves the detector
    // with this push and, if so, which sample it is.
    function automatic bit push(int i, int q, longint k, bit en, output int oi, output int oq,
                                output bit decided, output bit hit);
      int n, c;
      longint s, thr;
      hi.push_back(i);
      hq.push_back(q);
      hp.push_back(longint'(i) * i + longint'(q) * q);
      total++;
      // only the last WIN samples are needed; keep the history short
      if (hp.size() > WIN) begin
        void'(hi.pop_front());
        void'(hq.pop_front());
        void'(hp.pop_front());
      end
      n = hp.size();
      c = n - 1 - CUT;
      oi = 0; oq = 0;
      decided = 0; hit = 0;
      if (c < 0) return 0;
      oi = hi[c]; oq = hq[c];
      if (total < WIN) return !en;
      s = 0;
      for (int j = 0; j < NH; j++) s += hp[n - 1 - j];
      for (int j = NH + 2 * G + 1; j < WIN; j++) s += hp[n - 1 - j];
      thr = ((s >> M) * k) >> 8;
      decided = 1;
      hit = hp[c] > thr;
      return en ? hit : 1'b1;
    endfunction
  endclass

  // Gaussian value with standard deviation sigma (Box-Muller), rounded
  function automatic int gauss_bm(real sigma);
    real u1, u2;
    u1 = (real'($urandom_range(0, 32'hFFFF_FFFE)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return int'(sigma * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2));
  endfunction

  // approximately Gaussian value with standard deviation sigma
  function automatic int gauss(int sigma);
    int acc = 0;
    // four uniforms on [-sigma*sqrt(3), +sigma*sqrt(3)] have variance 4 sigma^2
    for (int j = 0; j < 4; j++) acc += $signed($urandom_range(0, 2 * 1732)) - 1732;
    return (acc * sigma) / 2000;
  endfunction

endpackage
