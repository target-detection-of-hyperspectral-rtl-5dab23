// rx_ref_pkg: reference model of the RX detector arithmetic for testbenches.
//
// Straight-line software versions of what the hardware computes, written
// from the algorithm rather than from the RTL's structure:
//   div_ref     signed division, truncated toward zero, magnitude saturated
//               to 2^(qw-1)-1, zero divisor giving the saturated magnitude.
//   inv_ref     integer Gauss-Jordan with the per-phase shifts; a zero pivot
//               is replaced by the first lower row with a non-zero entry in
//               the pivot column (rows exchanged physically).
//   rx_ref      y = d^T Kinv, rx = y . d at full precision.
//   sort_push   ordered insertion keeping the `depth` highest, ties in
//               arrival order.
// Matrices live in package arrays sized for up to MAXN bands.
package rx_ref_pkg;
  localparam int MAXN = 224;
  localparam int EW   = 42;   // element width
  localparam int QW   = 35;   // factor width

  typedef logic signed [127:0] wide_t;

  longint mA [MAXN][MAXN];    // working / input matrix
  longint mI [MAXN][MAXN];    // result (scaled inverse)
  int     n_swaps;
  bit     is_singular;

  function automatic longint wrap(input wide_t x, input int w);
    logic [127:0] u;
    u = x;
    u = u << (128 - w);
    return longint'(wide_t'(u) >>> (128 - w));
  endfunction

  function automatic longint div_ref(input longint n, input longint d, input int qw);
    logic [63:0] an, ad, q, qmax;
    bit neg;
    neg  = (n < 0) ^ (d < 0);
    an   = (n < 0) ? 64'(-n) : 64'(n);
    ad   = (d < 0) ? 64'(-d) : 64'(d);
    q    = (ad == 0) ? '1 : an / ad;
    qmax = (64'd1 << (qw - 1)) - 1;
    if (q > qmax) q = qmax;
    return neg ? -longint'(q) : longint'(q);
  endfunction

  // row_j -= (pivot_row * f) >>> sh, on both matrices
  function automatic void elim(input int n, input int i, input int j, input int sh);
    longint f;
    f = div_ref(wrap(wide_t'(mA[j][i]) <<< sh, 64), mA[i][i], QW);
    for (int k = 0; k < n; k++) begin
      mA[j][k] = wrap(wide_t'(mA[j][k]) - ((wide_t'(mA[i][k]) * wide_t'(f)) >>> sh), EW);
      mI[j][k] = wrap(wide_t'(mI[j][k]) - ((wide_t'(mI[i][k]) * wide_t'(f)) >>> sh), EW);
    end
  endfunction

  // mA holds K on entry; mI holds 2^(id+diag-out) * K^-1 on return
  function automatic void inv_ref(input int n, input int id_sh, input int fwd_sh,
                                  input int bwd_sh, input int diag_sh, input int out_sh);
    longint t, f;
    n_swaps = 0;
    is_singular = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) mI[r][c] = (r == c) ? (longint'(1) << id_sh) : 0;
    for (int i = 0; i < n - 1; i++) begin
      if (mA[i][i] == 0) begin
        int found;
        found = -1;
        for (int j = i + 1; j < n; j++)
          if (found < 0 && mA[j][i] != 0) found = j;
        if (found < 0) is_singular = 1;
        else begin
          n_swaps++;
          for (int k = 0; k < n; k++) begin
            t = mA[i][k]; mA[i][k] = mA[found][k]; mA[found][k] = t;
            t = mI[i][k]; mI[i][k] = mI[found][k]; mI[found][k] = t;
          end
        end
      end
      for (int j = i + 1; j < n; j++) elim(n, i, j, fwd_sh);
    end
    for (int i = n - 1; i >= 1; i--)
      for (int j = i - 1; j >= 0; j--) elim(n, i, j, bwd_sh);
    for (int i = 0; i < n; i++) begin
      f = div_ref(longint'(1) << diag_sh, mA[i][i], QW);
      for (int k = 0; k < n; k++) begin
        mA[i][k] = wrap((wide_t'(mA[i][k]) * wide_t'(f)) >>> out_sh, EW);
        mI[i][k] = wrap((wide_t'(mI[i][k]) * wide_t'(f)) >>> out_sh, EW);
      end
    end
  endfunction

  // rx score of deviation d using mI as K^-1 (logical row order)
  function automatic wide_t rx_ref(input int n, input longint d[MAXN]);
    wide_t y, acc;
    acc = 0;
    for (int c = 0; c < n; c++) begin
      y = 0;
      for (int k = 0; k < n; k++) y += wide_t'(mI[k][c]) * wide_t'(d[k]);
      acc += y * wide_t'(d[c]);
    end
    return acc;
  endfunction

  // ordered list of the highest scores
  typedef struct {
    wide_t value;
    int    x;
    int    y;
  } ent_t;

  ent_t   slist[$];

  function automatic void sort_clear();
    slist.delete();
  endfunction

  function automatic void sort_push(input ent_t e, input int depth);
    int pos;
    pos = slist.size();
    for (int k = slist.size() - 1; k >= 0; k--)
      if (e.value > slist[k].value) pos = k;
    if (pos < depth) begin
      slist.insert(pos, e);
      if (slist.size() > depth) void'(slist.pop_back());
    end
  endfunction
endpackage
