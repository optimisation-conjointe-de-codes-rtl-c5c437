// ldpc_model_pkg -- behavioural reference models for the testbenches (not synthesizable).
//
// encode:      parity of the QC-IRA code computed straight from the parity-check equations.
// tlbp_decode: the windowed Turbo Layered BP decoder written as plain loops over integers,
//              with its own saturation and min-sum helpers, in the same order of operations as
//              the hardware, so that hard decisions can be compared bit for bit.
// pipe_stalls: number of stalled slots of the pipelined schedule per frame: consecutive
//              windows (across iteration boundaries too) that share a variable.
// shift:       the circulant shift table of the code (the 3 x 3, z = 8 design example, scaled
//              by z/8 for larger multiples of 8).
package ldpc_model_pkg;

  localparam int MMAX = 31;    // message range
  localparam int AMAX = 127;   // a-posteriori range

  function automatic int shift(int i, int j, int z);
    int t [3][3] = '{'{0, 0, 0}, '{6, 7, 3}, '{3, 1, 6}};
    int b = t[i % 3][j % 3];
    return (z % 8 == 0) ? (b * (z / 8)) % z : b % z;
  endfunction

  function automatic int clampi(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  function automatic int absi(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int bp(int a, int b);
    int m = (absi(a) < absi(b)) ? absi(a) : absi(b);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // info[j*z + r]; parity[c], c = l*mb + i
  function automatic void encode(int z, int mb, int kb, input bit info[], output bit par[]);
    bit p = 0;
    par = new[mb * z];
    for (int l = 0; l < z; l++)
      for (int i = 0; i < mb; i++) begin
        bit s = 0;
        for (int j = 0; j < kb; j++) s ^= info[j * z + (l + shift(i, j, z)) % z];
        p = p ^ s;
        par[l * mb + i] = p;
      end
  endfunction

  // llr[0 .. K-1] systematic, llr[K .. K+M-1] parity; dec[j*z + r] hard decisions
  function automatic void tlbp_decode(int z, int mb, int kb, int j0, int win, int iters,
                                      input int llr[], output bit dec[]);
    int s_per = kb / j0;
    int k = kb * z, t = mb * z * s_per, nwin = t / win;
    int a[], mcv[], bnd[];
    int fbuf[], mbuf[], ybuf[], mvc[];
    int f, beta;
    a = new[k]; mcv = new[t * j0]; bnd = new[nwin];
    fbuf = new[win]; mbuf = new[win]; ybuf = new[win]; mvc = new[win * j0];
    for (int v = 0; v < k; v++) a[v] = llr[v];
    for (int e = 0; e < t * j0; e++) mcv[e] = 0;
    for (int it = 0; it < iters; it++) begin
      f = MMAX;
      for (int w = 0; w < nwin; w++) begin
        for (int kk = 0; kk < win; kk++) begin
          int s = w * win + kk, c = s / s_per, ts = s % s_per;
          int i = c % mb, l = c / mb, mio = MMAX;
          for (int q = 0; q < j0; q++) begin
            int j = ts * j0 + q, v = j * z + (l + shift(i, j, z)) % z;
            mvc[kk * j0 + q] = clampi(a[v] - mcv[s * j0 + q], MMAX);
            mio = bp(mio, mvc[kk * j0 + q]);
          end
          fbuf[kk] = f; mbuf[kk] = mio;
          ybuf[kk] = (ts == s_per - 1) ? llr[k + c] : 0;
          f = clampi(bp(f, mio) + ybuf[kk], MMAX);
        end
        beta = (it == 0 || w == nwin - 1) ? 0 : bnd[w];
        for (int kk = win - 1; kk >= 0; kk--) begin
          int s = w * win + kk, c = s / s_per, ts = s % s_per;
          int i = c % mb, l = c / mb;
          int g = clampi(ybuf[kk] + beta, MMAX);
          int moi = bp(fbuf[kk], g);
          beta = bp(g, mbuf[kk]);
          for (int q = 0; q < j0; q++) begin
            int j = ts * j0 + q, v = j * z + (l + shift(i, j, z)) % z;
            int nm = moi;                       // min-sum over every other input
            for (int q2 = 0; q2 < j0; q2++)
              if (q2 != q) nm = bp(nm, mvc[kk * j0 + q2]);
            a[v] = clampi(a[v] - mcv[s * j0 + q] + nm, AMAX);
            mcv[s * j0 + q] = nm;
          end
        end
        if (w > 0) bnd[w - 1] = beta;
      end
    end
    dec = new[k];
    for (int v = 0; v < k; v++) dec[v] = (a[v] < 0);
  endfunction

  // true when windows w0 and w1 share a systematic variable
  function automatic bit windows_meet(int z, int mb, int kb, int j0, int win, int w0, int w1);
    int s_per = kb / j0;
    for (int a = 0; a < win; a++)
      for (int b = 0; b < win; b++)
        for (int qa = 0; qa < j0; qa++)
          for (int qb = 0; qb < j0; qb++) begin
            int sa = w0 * win + a, sb = w1 * win + b;
            int ca = sa / s_per, cb = sb / s_per;
            int ja = (sa % s_per) * j0 + qa, jb = (sb % s_per) * j0 + qb;
            int va = ja * z + (ca / mb + shift(ca % mb, ja, z)) % z;
            int vb = jb * z + (cb / mb + shift(cb % mb, jb, z)) % z;
            if (va == vb) return 1;
          end
    return 0;
  endfunction

  function automatic int pipe_stalls(int z, int mb, int kb, int j0, int win, int iters);
    int nwin = mb * z * (kb / j0) / win, n = 0;
    for (int g = 0; g < iters * nwin - 1; g++)
      if (windows_meet(z, mb, kb, j0, win, g % nwin, (g + 1) % nwin)) n++;
    return n;
  endfunction

endpackage
