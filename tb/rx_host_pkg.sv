// rx_host_pkg: the host side of the RX detector for testbenches.
//
// Generates a synthetic hyperspectral image (independent uniform noise
// around a per-band level, plus a few planted anomalous pixels whose
// spectrum is raised on a band range), computes what the host processor
// supplies to the detector (integer band means, covariance
// sum(dev_i * dev_j) / (pixels - 1) truncated toward zero) and, through
// rx_ref_pkg, the expected list of most anomalous pixels.
// Pixels are numbered row by row: pixel p is at x = p % width, y = p / width.
package rx_host_pkg;
  import rx_ref_pkg::*;

  localparam int MAXP = 4096;

  int     pix   [MAXP][MAXN];
  longint mean  [MAXN];
  longint cov   [MAXN][MAXN];
  int     anom  [$];          // planted anomaly pixel indices

  function automatic void gen_image(input int n, input int w, input int h, input int n_anom,
                                    input int seed);
    int p_cnt, a;
    int level [MAXN];
    p_cnt = w * h;
    void'($urandom(seed));
    anom.delete();
    for (int b = 0; b < n; b++) level[b] = 20000 + $urandom_range(0, 20000);
    for (int p = 0; p < p_cnt; p++)
      for (int b = 0; b < n; b++)
        pix[p][b] = level[b] + $signed($urandom_range(0, 2048)) - 1024;
    for (int k = 0; k < n_anom; k++) begin
      a = (k * 7919 + 13) % p_cnt;
      anom.push_back(a);
      for (int b = 0; b < n; b++)
        if (b >= (k * n) / (n_anom + 1) && b < (k * n) / (n_anom + 1) + n / 3 + 1)
          pix[a][b] += 4000 + 500 * k;
    end
  endfunction

  // host processor: means and covariance
  function automatic void host_stats(input int n, input int p_cnt);
    longint s;
    for (int b = 0; b < n; b++) begin
      s = 0;
      for (int p = 0; p < p_cnt; p++) s += pix[p][b];
      mean[b] = s / p_cnt;
    end
    for (int i = 0; i < n; i++)
      for (int j = i; j < n; j++) begin
        s = 0;
        for (int p = 0; p < p_cnt; p++) s += (pix[p][i] - mean[i]) * (pix[p][j] - mean[j]);
        cov[i][j] = s / (p_cnt - 1);
        cov[j][i] = cov[i][j];
      end
  endfunction

  // expected sorter list for the covariance in `cov` (after the load shift)
  function automatic void expected(input int n, input int w, input int h, input int cov_sh,
                                   input int id_sh, input int fwd_sh, input int bwd_sh,
                                   input int diag_sh, input int out_sh);
    longint d [MAXN];
    ent_t e;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) mA[r][c] = wrap(wide_t'(cov[r][c]) >>> cov_sh, EW);
    inv_ref(n, id_sh, fwd_sh, bwd_sh, diag_sh, out_sh);
    sort_clear();
    for (int p = 0; p < w * h; p++) begin
      for (int b = 0; b < n; b++) d[b] = pix[p][b] - mean[b];
      e.value = rx_ref(n, d);
      e.x = p % w;
      e.y = p / w;
      sort_push(e, n);
    end
  endfunction
endpackage
