// oa_ref_pkg: reference models used by the testbenches.
//
// ref_iexp re-derives the I-BERT integer exponential with 64-bit integers;
// ref_softmax_row replays online softmax for one row chunk by chunk (same
// order of rescaling as the hardware, so results are bit-exact) and also
// reports the floating-point softmax so that testbenches can check the
// integer result is a sound approximation. Coefficients are derived from a
// score scale S = 0.05 and the I-BERT constants a = 0.3585, b = 1.353,
// c = 0.344.
package oa_ref_pkg;

  localparam int DIM = 16;

  // coefficients for S = 0.05
  localparam int QLN2     = 13;    // floor(ln2 / S)
  localparam int QLN2_INV = 5041;  // round(2^16 / 13)
  localparam int QB       = 27;    // floor(b / S)
  localparam int QC       = 383;   // floor(c / (a S^2))
  localparam real SCALE   = 0.05;

  function automatic longint ref_iexp(longint x);
    longint z, p, poly;
    if (x > 0) x = 0;
    z = ((-x) * QLN2_INV) / 65536;
    if (z >= 32) return 0;
    p = x + z * QLN2;
    poly = (p + QB) * (p + QB) + QC;
    if (poly < 0) return 0;
    return poly / (longint'(1) << z);
  endfunction

  function automatic longint sat32u(longint v);
    return (v > 64'hFFFF_FFFF) ? 64'hFFFF_FFFF : v;
  endfunction

  // Online softmax of one row of n scores; w receives the int8 weights.
  // Returns the number of times the running maximum grew after chunk 0.
  function automatic int ref_softmax_row(input int s[], input int n,
                                         output int w[], output real wf[]);
    longint m, l, r, e0, inv, e, q;
    int nch, grows;
    real mx, den;
    w = new[n];
    wf = new[n];
    e0 = QB * QB + QC;
    nch = (n + DIM - 1) / DIM;
    grows = 0;
    for (int c = 0; c < nch; c++) begin
      longint cm, se;
      cm = -(longint'(1) << 31);
      for (int j = c*DIM; j < n && j < (c+1)*DIM; j++) if (s[j] > cm) cm = s[j];
      if (c == 0) begin
        m = cm; l = 0;
      end else if (cm > m) begin
        r = ref_iexp(m - cm);
        l = sat32u((l * r) / e0);
        m = cm;
        grows++;
      end
      se = 0;
      for (int j = c*DIM; j < n && j < (c+1)*DIM; j++) se += ref_iexp(s[j] - m);
      l = sat32u(l + sat32u(se));
    end
    inv = (l == 0) ? 64'hFFFF_FFFF : sat32u((longint'(127) << 24) / l);
    for (int j = 0; j < n; j++) begin
      e = ref_iexp(s[j] - m);
      q = (e * inv) >> 24;
      w[j] = (q > 127) ? 127 : int'(q);
    end
    // floating-point softmax for a plausibility check
    mx = -1.0e30;
    for (int j = 0; j < n; j++) if (s[j] * SCALE > mx) mx = s[j] * SCALE;
    den = 0.0;
    for (int j = 0; j < n; j++) den += $exp(s[j] * SCALE - mx);
    for (int j = 0; j < n; j++) wf[j] = 127.0 * $exp(s[j] * SCALE - mx) / den;
    return grows;
  endfunction

  // tile layout: DIMxDIM tiles, tile (i, c) at base + (i*n_chunks + c)*DIM
  function automatic int tile_addr(int base, int row, int chunk, int n_chunks);
    return base + ((row / DIM) * n_chunks + chunk) * DIM + (row % DIM);
  endfunction

endpackage
