// Reference models for the wavelet testbenches.
//
// The filter taps are written out here a second time, as (sign, shift)
// lists, so that the models do not depend on the design's package. All
// arithmetic is on longint; each shifted term is rounded toward minus
// infinity like an arithmetic shift, and every stored word is wrapped to
// DWB bits. Images and subbands are held in MAXN x MAXN arrays with the
// used size passed separately.
package tb_dwt_pkg;

  localparam int DWB  = 20;
  localparam int FRB  = 6;
  localparam int MAXN = 64;

  typedef longint img_t [MAXN][MAXN];

  function automatic longint wrap(input longint v);
    longint m;
    m = v & ((64'sd1 <<< DWB) - 1);
    if (m >= (64'sd1 <<< (DWB - 1))) m = m - (64'sd1 <<< DWB);
    return m;
  endfunction

  function automatic longint term(input int s, input int sh, input longint x);
    return (s < 0) ? -(x >>> sh) : (x >>> sh);
  endfunction

  // low-pass tap a(k) (hi = 0) or high-pass tap b(k) (hi = 1) times x
  function automatic longint tap(input bit hi, input int k, input longint x);
    int kk;
    bit neg;
    longint r;
    // b(k) = (-1)^k a(3-k)
    kk  = hi ? 3 - k : k;
    neg = hi && (k % 2 == 1);
    case (kk)
      0: r = term(1, 1, x) + term(-1, 5, x) + term(-1, 10, x);
      1: r = term(1, 0, x) + term(-1, 3, x) + term(-1, 5, x);
      2: r = term(1, 2, x) + term(-1, 6, x) + term(-1, 8, x);
      default: r = term(-1, 3, x) + term(-1, 8, x) + term(1, 10, x);
    endcase
    if (neg) begin
      // the negated taps are stored with their terms negated
      case (kk)
        0: r = term(-1, 1, x) + term(1, 5, x) + term(1, 10, x);
        1: r = term(-1, 0, x) + term(1, 3, x) + term(1, 5, x);
        2: r = term(-1, 2, x) + term(1, 6, x) + term(1, 8, x);
        default: r = term(1, 3, x) + term(1, 8, x) + term(-1, 10, x);
      endcase
    end
    return r;
  endfunction

  function automatic longint at(input img_t a, input int r, input int c);
    return (r < 0 || c < 0) ? 0 : a[r][c];
  endfunction

  // One forward level on an M x M input: subbands of size M/2.
  // L(n) = sum_k a(k) x(2n+1-k), then the same down the columns.
  task automatic fwd_level(input int M, input img_t x,
                           output img_t ll, output img_t lh,
                           output img_t hl, output img_t hh);
    img_t lo, hi;
    for (int r = 0; r < M; r++)
      for (int n = 0; n < M / 2; n++) begin
        longint sl, sh;
        sl = 0; sh = 0;
        for (int k = 0; k < 4; k++) begin
          sl += tap(0, k, at(x, r, 2 * n + 1 - k));
          sh += tap(1, k, at(x, r, 2 * n + 1 - k));
        end
        lo[r][n] = wrap(sl);
        hi[r][n] = wrap(sh);
      end
    for (int m = 0; m < M / 2; m++)
      for (int n = 0; n < M / 2; n++) begin
        longint a, b, c, d;
        a = 0; b = 0; c = 0; d = 0;
        for (int k = 0; k < 4; k++) begin
          a += tap(0, k, at(lo, 2 * m + 1 - k, n));
          b += tap(1, k, at(lo, 2 * m + 1 - k, n));
          c += tap(0, k, at(hi, 2 * m + 1 - k, n));
          d += tap(1, k, at(hi, 2 * m + 1 - k, n));
        end
        ll[m][n] = wrap(a);
        lh[m][n] = wrap(b);
        hl[m][n] = wrap(c);
        hh[m][n] = wrap(d);
      end
  endtask

  // Synthesis of one 1-D pair: even phase (taps 3,1) or odd phase (2,0).
  function automatic longint syn(input bit odd, input longint l, input longint lp,
                                 input longint h, input longint hp);
    if (!odd) return tap(0, 3, l) + tap(0, 1, lp) + tap(1, 3, h) + tap(1, 1, hp);
    else      return tap(0, 2, l) + tap(0, 0, lp) + tap(1, 2, h) + tap(1, 0, hp);
  endfunction

  // One inverse level on M x M subbands: a 2M x 2M result in the order the
  // hardware delivers it (row/column 2r+i holds sample 2r-2+i).
  task automatic inv_level(input int M, input img_t ll, input img_t lh,
                           input img_t hl, input img_t hh, output img_t xh);
    img_t lr, hr;
    for (int m = 0; m < M; m++)
      for (int n = 0; n < M; n++)
        for (int i = 0; i < 2; i++) begin
          lr[2 * m + i][n] = wrap(syn(i[0], ll[m][n], at(ll, m - 1, n), lh[m][n], at(lh, m - 1, n)));
          hr[2 * m + i][n] = wrap(syn(i[0], hl[m][n], at(hl, m - 1, n), hh[m][n], at(hh, m - 1, n)));
        end
    for (int r = 0; r < 2 * M; r++)
      for (int n = 0; n < M; n++)
        for (int j = 0; j < 2; j++)
          xh[r][2 * n + j] = wrap(syn(j[0], lr[r][n], at(lr, r, n - 1), hr[r][n], at(hr, r, n - 1)));
  endtask

  // Next level's LL from a hardware-ordered reconstruction of size 2M:
  // shifted by two samples, last two rows and columns zero.
  task automatic align_ll(input int M2, input img_t xh, output img_t ll);
    for (int i = 0; i < M2; i++)
      for (int j = 0; j < M2; j++)
        ll[i][j] = (i + 2 < M2 && j + 2 < M2) ? xh[i + 2][j + 2] : 0;
  endtask

endpackage
