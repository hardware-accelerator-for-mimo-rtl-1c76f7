// mimo_ref_pkg: reference model for the detector testbenches.
//
// Recomputes the fixed-complexity tree search with ordinary integer
// arithmetic (true multiplications, exhaustive nearest-point search instead
// of the threshold slicer) so that the RTL's shift-add products, folded
// slicer and compare/select logic are checked against an independent model.
// Symbols are kept as integer levels (odd values -7..7) and converted to the
// RTL's sign-magnitude code only for comparison.
package mimo_ref_pkg;

  typedef struct {
    int yre [5];
    int yim [5];
    int rre [5][5];   // rre[i][j], i <= j, 1-based; R_ii real
    int rim [5][5];
  } prob_t;

  typedef struct {
    int sre [5];
    int sim [5];
    longint d;
  } path_r;

  function automatic int nlev(int mf);
    return (mf == 0) ? 2 : (mf == 1) ? 4 : 8;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // level value -> 3-bit sign-magnitude code
  function automatic logic [2:0] enc(int v);
    logic [1:0] m;
    m = 2'((iabs(v) - 1) / 2);
    return {v < 0, m};
  endfunction

  // Nearest level to c / r on an axis with L levels; ties to the smaller
  // magnitude, then to the positive level.
  function automatic int near(int c, int r, int mf);
    int best, bd;
    best = 1; bd = iabs(c - r);
    for (int m = 0; m < nlev(mf) / 2; m++) begin
      for (int sg = 0; sg < 2; sg++) begin
        int v;
        v = (sg != 0) ? -(2 * m + 1) : (2 * m + 1);
        if (iabs(c - r * v) < bd) begin bd = iabs(c - r * v); best = v; end
      end
    end
    return best;
  endfunction

  // Complete the path whose top symbol (level 4) is (a4, b4); n = antennas.
  function automatic path_r extend(prob_t p, int a4, int b4, int mf, int n);
    path_r r;
    r.d = 0;
    for (int i = 1; i <= 4; i++) begin r.sre[i] = 0; r.sim[i] = 0; end
    for (int i = 4; i >= 5 - n; i--) begin
      int cre, cim, ere, eim;
      cre = p.yre[i]; cim = p.yim[i];
      for (int j = i + 1; j <= 4; j++) begin
        cre -= p.rre[i][j] * r.sre[j] - p.rim[i][j] * r.sim[j];
        cim -= p.rre[i][j] * r.sim[j] + p.rim[i][j] * r.sre[j];
      end
      if (i == 4) begin
        r.sre[4] = a4; r.sim[4] = b4;
      end else begin
        r.sre[i] = near(cre, p.rre[i][i], mf);
        r.sim[i] = near(cim, p.rre[i][i], mf);
      end
      ere = cre - p.rre[i][i] * r.sre[i];
      eim = cim - p.rre[i][i] * r.sim[i];
      r.d += longint'(iabs(ere)) + longint'(iabs(eim));
    end
    return r;
  endfunction

  // Gray label of one level on an L-level axis (p = level index from the
  // most negative level), right-aligned in 3 bits.
  function automatic logic [2:0] glabel(int v, int mf);
    int p;
    p = (v + nlev(mf) - 1) / 2;
    return 3'(p ^ (p >> 1));
  endfunction

  // Random problem y = R s + noise with entries that fit the 11-bit input
  // format (clamped to +/-1023); s is drawn from the constellation of mf.
  function automatic prob_t rand_prob(int n, int mf);
    prob_t p;
    int sre [5];
    int sim [5];
    for (int i = 1; i <= 4; i++) begin
      sre[i] = 2 * int'($urandom_range(0, nlev(mf) - 1)) - (nlev(mf) - 1);
      sim[i] = 2 * int'($urandom_range(0, nlev(mf) - 1)) - (nlev(mf) - 1);
      for (int j = 1; j <= 4; j++) begin p.rre[i][j] = 0; p.rim[i][j] = 0; end
    end
    for (int i = 1; i <= 4; i++) begin
      p.rre[i][i] = 12 + int'($urandom_range(0, 70));
      for (int j = i + 1; j <= 4; j++) begin
        p.rre[i][j] = int'($urandom_range(0, 24)) - 12;
        p.rim[i][j] = int'($urandom_range(0, 24)) - 12;
      end
    end
    for (int i = 1; i <= 4; i++) begin
      int vre, vim;
      vre = int'($urandom_range(0, 80)) - 40;
      vim = int'($urandom_range(0, 80)) - 40;
      for (int j = i; j <= 4; j++) begin
        vre += p.rre[i][j] * sre[j] - p.rim[i][j] * sim[j];
        vim += p.rre[i][j] * sim[j] + p.rim[i][j] * sre[j];
      end
      p.yre[i] = vre > 1023 ? 1023 : (vre < -1023 ? -1023 : vre);
      p.yim[i] = vim > 1023 ? 1023 : (vim < -1023 ? -1023 : vim);
    end
    return p;
  endfunction

endpackage
