// tb_ldpc_util_pkg: testbench helpers for the LDPC decoder.
//
// - code construction: the parity check matrix H is expanded from the base
//   matrix and brought to reduced row-echelon form over GF(2) once; a valid
//   codeword is then made by choosing the non-pivot bits at random and
//   solving each reduced row for its pivot bit.
// - channel: BPSK (bit 0 -> +1, bit 1 -> -1) plus Gaussian noise
//   (Box-Muller), quantised to 8 bits with 4 fraction bits.
// - a bit-true reference of the decoder written from the algorithm
//   description (flooding schedule, integer arithmetic, its own correction
//   table computed with real math), used to check the RTL.
package tb_ldpc_util_pkg;
  import ldpc_pkg::Z, ldpc_pkg::NBR, ldpc_pkg::NBC, ldpc_pkg::N, ldpc_pkg::M, ldpc_pkg::HB;

  typedef logic [N-1:0] word_t;

  word_t rref [M];
  int    pivot_of_row [M];
  bit    is_pivot [N];
  int    rank;
  bit    built = 0;

  function automatic word_t h_row(int i, int t);
    word_t v = '0;
    for (int j = 0; j < NBC; j++)
      if (HB[i][j] >= 0) v[j * Z + (t + HB[i][j]) % Z] = 1'b1;
    return v;
  endfunction

  function automatic void build_code();
    word_t tmp;
    int r = 0;
    for (int i = 0; i < NBR; i++)
      for (int t = 0; t < Z; t++) rref[i * Z + t] = h_row(i, t);
    for (int n = 0; n < N; n++) is_pivot[n] = 0;
    for (int col = 0; col < N && r < M; col++) begin
      int p = -1;
      for (int k = r; k < M; k++) if (rref[k][col]) begin p = k; break; end
      if (p < 0) continue;
      tmp = rref[r]; rref[r] = rref[p]; rref[p] = tmp;
      for (int k = 0; k < M; k++)
        if (k != r && rref[k][col]) rref[k] ^= rref[r];
      pivot_of_row[r] = col;
      is_pivot[col] = 1;
      r++;
    end
    rank = r;
    built = 1;
  endfunction

  function automatic word_t random_codeword();
    word_t v = '0;
    if (!built) build_code();
    for (int n = 0; n < N; n++) if (!is_pivot[n]) v[n] = 1'($urandom_range(0, 1));
    for (int r = 0; r < rank; r++) begin
      logic b = 1'b0;
      word_t x = rref[r];
      x[pivot_of_row[r]] = 1'b0;
      b = ^(x & v);
      v[pivot_of_row[r]] = b;
    end
    return v;
  endfunction

  function automatic bit parity_ok(word_t v);
    for (int i = 0; i < NBR; i++)
      for (int t = 0; t < Z; t++)
        if (^(h_row(i, t) & v)) return 0;
    return 1;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.141592653589793 * u2);
  endfunction

  function automatic int clip(int v, int lim);
    if (v > lim) return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  // received sample of bit b with noise deviation sigma, in 1/16 units
  function automatic int channel(bit b, real sigma);
    real y = (b ? -1.0 : 1.0) + sigma * gauss();
    return clip($rtoi($floor(y * 16.0 + 0.5)), 127);
  endfunction

  // floor(a / b) for b > 0
  function automatic int fdiv(int a, int b);
    int q = a / b;
    if ((a % b) != 0 && a < 0) q--;
    return q;
  endfunction

  // SNR scaling: factor = int_sel + dec_sel/4, rounded to nearest 1/16
  function automatic int snr_scale(int y, int snr_int, int snr_frac);
    int isel = (snr_int < 2) ? 1 : (snr_int > 10) ? 10 : snr_int;
    int dsel = snr_frac / 4;
    return clip(fdiv(y * (4 * isel + dsel) + 2, 4), 127);
  endfunction

  int corr_tab [0:1023];
  bit corr_built = 0;

  function automatic int corr(int x);
    if (!corr_built) begin
      for (int k = 0; k < 1024; k++)
        corr_tab[k] = $rtoi($floor(16.0 * $ln(1.0 + $exp(-real'(k) / 16.0)) + 0.5));
      corr_built = 1;
    end
    return corr_tab[x];
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int bplus(int a, int b);
    int m = iabs(a) < iabs(b) ? iabs(a) : iabs(b);
    int s = ((a < 0) != (b < 0)) ? -m : m;
    return clip(s + corr(iabs(a + b)) - corr(iabs(a - b)), 127);
  endfunction

  // Check-node rule on a list of inputs: for each i, fold of the others
  // (left part folded from the left, right part from the right).
  function automatic void check_rule(input int q [], output int r []);
    int d = q.size();
    r = new[d];
    for (int i = 0; i < d; i++) begin
      int lft = 0, rgt = 0;
      bit lv = 0, rv = 0;
      for (int k = 0; k < i; k++) begin
        lft = lv ? bplus(lft, q[k]) : q[k];
        lv = 1;
      end
      for (int k = d - 1; k > i; k--) begin
        rgt = rv ? bplus(rgt, q[k]) : q[k];
        rv = 1;
      end
      r[i] = (lv && rv) ? bplus(lft, rgt) : lv ? lft : rgt;
    end
  endfunction

  // Reference decoder. Message on block (i,j) at check row t.
  int rmsg [NBR][NBC][Z];
  int qmsg [NBR][NBC][Z];

  function automatic void ref_decode(input int lch [N], input int max_iter,
                                     output word_t hdw, output int iters,
                                     output bit ok);
    for (int p = 0; ; p++) begin
      // bit-node pass
      for (int j = 0; j < NBC; j++)
        for (int c = 0; c < Z; c++) begin
          int post = lch[j * Z + c];
          for (int i = 0; i < NBR; i++)
            if (HB[i][j] >= 0 && p > 0) post += rmsg[i][j][(c - HB[i][j] + Z) % Z];
          hdw[j * Z + c] = (post < 0);
          for (int i = 0; i < NBR; i++)
            if (HB[i][j] >= 0) begin
              int t = (c - HB[i][j] + Z) % Z;
              qmsg[i][j][t] = clip(post - ((p > 0) ? rmsg[i][j][t] : 0), 127);
            end
        end
      ok = parity_ok(hdw);
      if (ok || p >= max_iter) begin
        iters = p;
        return;
      end
      // check-node pass
      for (int i = 0; i < NBR; i++)
        for (int t = 0; t < Z; t++) begin
          int qs [];
          int rs [];
          int n = 0;
          qs = new[8];
          for (int j = 0; j < NBC; j++) if (HB[i][j] >= 0) begin qs[n] = qmsg[i][j][t]; n++; end
          qs = new[n](qs);
          check_rule(qs, rs);
          n = 0;
          for (int j = 0; j < NBC; j++) if (HB[i][j] >= 0) begin rmsg[i][j][t] = rs[n]; n++; end
        end
    end
  endfunction

endpackage
