// wf_ref_pkg -- behavioural reference of the Wiener filter estimation,
// written as plain sequential code on 64-bit integers, for the
// testbenches. It restates the arithmetic of the design independently of
// the RTL structure: pivoting as an adjacent-swap pass, elimination and
// back-substitution as loops, C-style truncating division.
// It also generates statistics (H blocks, M) from a synthetic image.
package wf_ref_pkg;

  typedef longint vec7_t [7];
  typedef longint mat7_t [7][7];
  typedef longint vec4_t [4];
  typedef longint mat4_t [4][4];
  typedef longint hmat_t [7][7][7][7];   // [i][j][k][l] = H_ij[k][l]
  typedef longint sys_a_t [3][3];
  typedef longint sys_b_t [3];

  localparam int SL = 16;
  localparam int FS = 8;

  function automatic longint unsigned mag(longint v);
    return (v < 0) ? longint'(-v) : longint'(v);
  endfunction

  function automatic int fold(int t);
    return (t > 3) ? 6 - t : t;
  endfunction

  function automatic void enforce(input vec4_t av, input mat4_t bm,
                                  output sys_a_t sa, output sys_b_t sb);
    for (int i = 0; i < 3; i++) begin
      sb[i] = av[i] - (2 * av[3] + bm[i][3] - 2 * bm[3][3]);
      for (int j = 0; j < 3; j++)
        sa[i][j] = bm[i][j] - 2 * (bm[i][3] + bm[3][j] - 2 * bm[3][3]);
    end
  endfunction

  function automatic void swap_rows(inout sys_a_t sa, inout sys_b_t sb, input int r);
    longint t;
    for (int j = 0; j < 3; j++) begin
      t = sa[r][j]; sa[r][j] = sa[r-1][j]; sa[r-1][j] = t;
    end
    t = sb[r]; sb[r] = sb[r-1]; sb[r-1] = t;
  endfunction

  // pivoting for column k: adjacent swaps from the bottom row upward
  function automatic void pivot(inout sys_a_t sa, inout sys_b_t sb, input int k);
    for (int i = 2; i > k; i--)
      if (mag(sa[i-1][k]) < mag(sa[i][k])) swap_rows(sa, sb, i);
  endfunction

  function automatic longint qdiv(longint n, longint d);
    return (d == 0) ? 0 : n / d;
  endfunction

  // elimination of column k; returns 1 when the pivot is zero
  function automatic bit eliminate(inout sys_a_t sa, inout sys_b_t sb, input int k);
    longint c, p;
    p = sa[k][k];
    for (int r = k + 1; r < 3; r++) begin
      c = sa[r][k];
      for (int j = k + 1; j < 3; j++)
        sa[r][j] = sa[r][j] - (qdiv((c >>> FS) * sa[k][j], p) <<< FS);
      sb[r] = sb[r] - (qdiv((c >>> FS) * sb[k], p) <<< FS);
      sa[r][k] = 0;
    end
    return p == 0;
  endfunction

  function automatic bit backsub(input sys_a_t sa, input sys_b_t sb, output longint x [3]);
    longint c;
    bit z = 0;
    for (int i = 2; i >= 0; i--) begin
      c = 0;
      for (int j = i + 1; j < 3; j++) c += (sa[i][j] * x[j]) >>> SL;
      if (sa[i][i] == 0) z = 1;
      x[i] = qdiv((sb[i] - c) <<< SL, sa[i][i]);
    end
    return z;
  endfunction

  function automatic void symm(input longint x [3], output vec7_t f);
    for (int i = 0; i < 3; i++) begin f[i] = x[i]; f[6-i] = x[i]; end
    f[3] = (64'sd1 <<< SL) - 2 * (x[0] + x[1] + x[2]);
  endfunction

  // whole solver; returns 1 if singular
  function automatic bit solve_sys(input vec4_t av, input mat4_t bm, output vec7_t f);
    sys_a_t sa; sys_b_t sb; longint x [3]; bit z;
    enforce(av, bm, sa, sb);
    pivot(sa, sb, 0);
    z = eliminate(sa, sb, 0);
    pivot(sa, sb, 1);
    z |= eliminate(sa, sb, 1);
    z |= backsub(sa, sb, x);
    symm(x, f);
    return z;
  endfunction

  function automatic void stats_a(input hmat_t h, input mat7_t m, input vec7_t b,
                                  output vec4_t av, output mat4_t bm);
    av = '{default: 0};
    bm = '{default: '{default: 0}};
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        av[fold(j)] += (m[i][j] * b[i]) >>> SL;
        for (int k = 0; k < 7; k++)
          for (int l = 0; l < 7; l++)
            bm[fold(k)][fold(l)] += (((h[i][j][k][l] * b[i]) >>> SL) * b[j]) >>> SL;
      end
  endfunction

  function automatic void stats_b(input hmat_t h, input mat7_t m, input vec7_t a,
                                  output vec4_t av, output mat4_t bm);
    av = '{default: 0};
    bm = '{default: '{default: 0}};
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        av[fold(i)] += (m[i][j] * a[j]) >>> SL;
        for (int k = 0; k < 7; k++)
          for (int l = 0; l < 7; l++)
            bm[fold(i)][fold(j)] += (((h[i][j][k][l] * a[k]) >>> SL) * a[l]) >>> SL;
      end
  endfunction

  // one full iteration; fallback on a singular system keeps the fixed vector
  function automatic void iterate(input hmat_t h, input mat7_t m, input vec7_t b_in,
                                  output vec7_t a, output vec7_t b,
                                  output bit za, output bit zb);
    vec4_t av; mat4_t bm;
    stats_a(h, m, b_in, av, bm);
    za = solve_sys(av, bm, a);
    if (za) a = b_in;
    stats_b(h, m, a, av, bm);
    zb = solve_sys(av, bm, b);
    if (zb) b = a;
  endfunction

  // Statistics of a synthetic frame: a random source image src, degraded
  // by a separable blur plus noise into deg. For every pixel p of an
  // n x n interior region, X_p[r][c] = deg[py+r-3][px+c-3] and Y_p = src[p];
  //   H_ij[k][l] = sum_p X_p[k][i] * X_p[l][j],  M[i][j] = sum_p Y_p * X_p[j][i]
  // Pixel values are centred on 0 (range -128..127).
  typedef longint frame_t [40][40];

  // synthetic source frame and its degraded version, (n+6) x (n+6), n <= 34
  function automatic void make_frames(input int n, input int seed,
                                      output frame_t src, output frame_t deg);
    frame_t tmp;
    int unsigned s;
    s = seed;
    for (int y = 0; y < n + 6; y++)
      for (int x = 0; x < n + 6; x++) begin
        s = s * 1103515245 + 12345;
        src[y][x] = longint'(32'((s >> 16) & 255)) - 128;
      end
    for (int y = 0; y < n + 6; y++)
      for (int x = 0; x < n + 6; x++) begin
        tmp[y][x] = src[y][x];
        if (x > 0 && x < n + 5) tmp[y][x] = (src[y][x-1] + 2 * src[y][x] + src[y][x+1]) / 4;
      end
    for (int y = 0; y < n + 6; y++)
      for (int x = 0; x < n + 6; x++) begin
        deg[y][x] = tmp[y][x];
        if (y > 0 && y < n + 5) deg[y][x] = (tmp[y-1][x] + 2 * tmp[y][x] + tmp[y+1][x]) / 4;
        s = s * 1103515245 + 12345;
        deg[y][x] += longint'(32'((s >> 16) & 7)) - 3;
      end
  endfunction

  function automatic void make_stats(input int n, input int seed,
                                     output hmat_t h, output mat7_t m);
    frame_t src, deg;
    make_frames(n, seed, src, deg);
    h = '{default: '{default: '{default: '{default: 0}}}};
    m = '{default: '{default: 0}};
    for (int py = 3; py < n + 3; py++)
      for (int px = 3; px < n + 3; px++)
        for (int i = 0; i < 7; i++)
          for (int j = 0; j < 7; j++) begin
            m[i][j] += src[py][px] * deg[py+j-3][px+i-3];
            for (int k = 0; k < 7; k++)
              for (int l = 0; l < 7; l++)
                h[i][j][k][l] += deg[py+k-3][px+i-3] * deg[py+l-3][px+j-3];
          end
  endfunction

endpackage
