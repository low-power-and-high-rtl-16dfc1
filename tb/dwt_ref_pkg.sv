// dwt_ref_pkg -- integer reference model of the quantized periodic D4
// analysis and synthesis, for the testbenches.
//
// Written with plain multiplications by the integer taps (h, g scaled by
// 256) and round-half-up division by 256, independently of the shift-add
// hardware. Conventions (W the current size, indices modulo W):
//   analysis   lo(n) = sum_k h(k) x(2n+3-k),  hi(n) = sum_k g(k) x(2n+3-k)
//              rows first, then columns
//   synthesis  x(2n)   = h1 lo(n-1) + g1 hi(n-1) + h3 lo(n) + g3 hi(n)
//              x(2n+1) = h0 lo(n-1) + g0 hi(n-1) + h2 lo(n) + g2 hi(n)
//              columns first, then rows
// State lives in package arrays: img (input), ll/lh/hl/hh[level] (analysis
// result, ll of every level), rec (synthesis result).
package dwt_ref_pkg;

  localparam int MAXN = 64;
  localparam int MAXJ = 5;

  int H [4] = '{118, 216, 63, -35};
  int G [4] = '{-35, -63, 216, -118};

  int img [MAXN][MAXN];
  int ll [MAXJ+1][MAXN][MAXN];
  int lh [MAXJ+1][MAXN][MAXN];
  int hl [MAXJ+1][MAXN][MAXN];
  int hh [MAXJ+1][MAXN][MAXN];
  int rec [MAXN][MAXN];

  function automatic int rnd(int s);
    return (s + 128) >>> 8;
  endfunction

  function automatic void forward(int n, int j);
    int a [MAXN][MAXN];
    int lr [MAXN][MAXN];
    int hr [MAXN][MAXN];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) a[r][c] = img[r][c];
    for (int lv = 1; lv <= j; lv++) begin
      int s = n >> (lv - 1);
      for (int r = 0; r < s; r++)
        for (int c = 0; c < s / 2; c++) begin
          int sl = 0, sh = 0;
          for (int k = 0; k < 4; k++) begin
            sl += H[k] * a[r][(2*c + 3 - k) % s];
            sh += G[k] * a[r][(2*c + 3 - k) % s];
          end
          lr[r][c] = rnd(sl);
          hr[r][c] = rnd(sh);
        end
      for (int m = 0; m < s / 2; m++)
        for (int c = 0; c < s / 2; c++) begin
          int s1 = 0, s2 = 0, s3 = 0, s4 = 0;
          for (int k = 0; k < 4; k++) begin
            s1 += H[k] * lr[(2*m + 3 - k) % s][c];
            s2 += H[k] * hr[(2*m + 3 - k) % s][c];
            s3 += G[k] * lr[(2*m + 3 - k) % s][c];
            s4 += G[k] * hr[(2*m + 3 - k) % s][c];
          end
          ll[lv][m][c] = rnd(s1);
          lh[lv][m][c] = rnd(s2);
          hl[lv][m][c] = rnd(s3);
          hh[lv][m][c] = rnd(s4);
        end
      for (int m = 0; m < s / 2; m++)
        for (int c = 0; c < s / 2; c++) a[m][c] = ll[lv][m][c];
    end
  endfunction

  // Synthesis from ll[j] and the detail bands of levels j..1.
  function automatic void inverse(int n, int j);
    int a [MAXN][MAXN];
    int lc [MAXN][MAXN];
    int hc [MAXN][MAXN];
    int m;
    m = n >> j;
    for (int r = 0; r < m; r++)
      for (int c = 0; c < m; c++) a[r][c] = ll[j][r][c];
    for (int lv = j; lv >= 1; lv--) begin
      m = n >> lv;
      for (int q = 0; q < m; q++)
        for (int c = 0; c < m; c++) begin
          int qm = (q + m - 1) % m;
          lc[2*q][c]   = rnd(H[1]*a[qm][c] + G[1]*hl[lv][qm][c] + H[3]*a[q][c] + G[3]*hl[lv][q][c]);
          lc[2*q+1][c] = rnd(H[0]*a[qm][c] + G[0]*hl[lv][qm][c] + H[2]*a[q][c] + G[2]*hl[lv][q][c]);
          hc[2*q][c]   = rnd(H[1]*lh[lv][qm][c] + G[1]*hh[lv][qm][c] + H[3]*lh[lv][q][c] + G[3]*hh[lv][q][c]);
          hc[2*q+1][c] = rnd(H[0]*lh[lv][qm][c] + G[0]*hh[lv][qm][c] + H[2]*lh[lv][q][c] + G[2]*hh[lv][q][c]);
        end
      for (int r = 0; r < 2*m; r++)
        for (int c = 0; c < m; c++) begin
          int cm = (c + m - 1) % m;
          a[r][2*c]   = rnd(H[1]*lc[r][cm] + G[1]*hc[r][cm] + H[3]*lc[r][c] + G[3]*hc[r][c]);
          a[r][2*c+1] = rnd(H[0]*lc[r][cm] + G[0]*hc[r][cm] + H[2]*lc[r][c] + G[2]*hc[r][c]);
        end
    end
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) rec[r][c] = a[r][c];
  endfunction

endpackage
