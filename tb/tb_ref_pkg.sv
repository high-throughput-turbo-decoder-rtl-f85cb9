// tb_ref_pkg: reference model of the turbo decoder arithmetic for the
// testbenches, written independently of the RTL from the code definition.
//
// The LTE constituent encoder is modelled as its shift register
// (d1, d2, d3): feedback bit a = u ^ d2 ^ d3, parity z = a ^ d1 ^ d3, and
// the registers shift to (a, d1, d2); state number = 4*d1 + 2*d2 + d3.
// A branch labelled (u, z) has metric u*(ls+la) + z*lp. Recursions use
// max-log add-compare-select, subtract the new metric of state 0, and
// saturate to 12 bits; extrinsic LLRs saturate to 8 bits, a posteriori
// LLRs to 12 bits.
package tb_ref_pkg;

  typedef int mset_t [8];

  function automatic int sat(int v, int bits);
    int hi, lo;
    hi = (1 << (bits - 1)) - 1;
    lo = -(1 << (bits - 1));
    return (v > hi) ? hi : ((v < lo) ? lo : v);
  endfunction

  function automatic void enc_step(int st, int u, output int nst, output int z);
    int d1, d2, d3, a;
    d1 = (st >> 2) & 1;
    d2 = (st >> 1) & 1;
    d3 = st & 1;
    a  = u ^ d2 ^ d3;
    z  = a ^ d1 ^ d3;
    nst = (a << 2) | (d1 << 1) | d2;
  endfunction

  function automatic int bmet(int u, int z, int ls, int lp, int la);
    return u * (ls + la) + z * lp;
  endfunction

  function automatic mset_t fwd_step(mset_t a, int ls, int lp, int la);
    mset_t r;
    int best [8];
    bit seen [8];
    for (int s = 0; s < 8; s++) seen[s] = 0;
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        int ns, z, m;
        enc_step(s, u, ns, z);
        m = a[s] + bmet(u, z, ls, lp, la);
        if (!seen[ns] || m > best[ns]) begin best[ns] = m; seen[ns] = 1; end
      end
    for (int s = 0; s < 8; s++) r[s] = sat(best[s] - best[0], 12);
    return r;
  endfunction

  function automatic mset_t bwd_step(mset_t b, int ls, int lp, int la);
    mset_t r;
    int best [8];
    for (int s = 0; s < 8; s++) begin
      int m0, m1, ns, z;
      enc_step(s, 0, ns, z); m0 = b[ns] + bmet(0, z, ls, lp, la);
      enc_step(s, 1, ns, z); m1 = b[ns] + bmet(1, z, ls, lp, la);
      best[s] = (m0 > m1) ? m0 : m1;
    end
    for (int s = 0; s < 8; s++) r[s] = sat(best[s] - best[0], 12);
    return r;
  endfunction

  // a posteriori LLR (12 bit) and extrinsic LLR (8 bit) of one stage
  function automatic void llr(mset_t a, mset_t b, int ls, int lp, int la,
                              output int app, output int ext);
    int b1, b0;
    b1 = -(1 << 30);
    b0 = -(1 << 30);
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        int ns, z, m;
        enc_step(s, u, ns, z);
        m = a[s] + b[ns] + bmet(u, z, ls, lp, la);
        if (u == 1) begin if (m > b1) b1 = m; end
        else        begin if (m > b0) b0 = m; end
      end
    app = sat(b1 - b0, 12);
    ext = sat(b1 - b0 - ls - la, 8);
  endfunction

  // Windowed MAP decoding of a stream of n stages. amode: 0 continue,
  // 1 all states equal, 2 state 0 known. Stages past the stream end count
  // as zero-LLR stages. Backward metrics of stage k come from a recursion
  // started with equal metrics M-1 stages further on.
  function automatic void map_ref(int n, int M, int ls[], int lp[], int la[], int amode[],
                                  ref int app[], ref int ext[]);
    mset_t alpha, beta, zero;
    for (int s = 0; s < 8; s++) begin zero[s] = 0; alpha[s] = 0; end
    app = new[n];
    ext = new[n];
    for (int k = 0; k < n; k++) begin
      mset_t acur;
      beta = zero;
      for (int j = k + M - 1; j > k; j--) begin
        if (j < n) beta = bwd_step(beta, ls[j], lp[j], la[j]);
        else       beta = bwd_step(beta, 0, 0, 0);
      end
      if (amode[k] == 2) begin
        for (int s = 0; s < 8; s++) acur[s] = (s == 0) ? 0 : -1024;
      end else if (amode[k] == 1) acur = zero;
      else acur = alpha;
      llr(acur, beta, ls[k], lp[k], la[k], app[k], ext[k]);
      alpha = fwd_step(acur, ls[k], lp[k], la[k]);
    end
  endfunction

  function automatic int qpp(int i, int K, int f1, int f2);
    longint v;
    v = (longint'(f1) * i + longint'(f2) * i * i) % longint'(K);
    return int'(v);
  endfunction

endpackage
