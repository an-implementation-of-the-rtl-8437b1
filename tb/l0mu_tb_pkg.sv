// l0mu_tb_pkg: reference model shared by the trigger testbenches.
//
// A crossing is described by a pad map `pm`: the set of (station, row,
// column) pads that were hit, on the common fine grid (station 0 = mu1 ..
// 4 = mu5). From the map the package derives, independently of the RTL:
// the 31 pads a cell reads, its two 16-bit input words, the seed and
// triple-coincidence flags of a mu3 pad, and the full 47-pad candidate
// record of a seed. `s2_model` gives the second-stack result for a record.
package l0mu_tb_pkg;
  import l0mu_pkg::*;

  bit pm [int];

  function automatic int key(int p, int r, int c);
    return p * 1000000 + (r + 100) * 1000 + (c + 100);
  endfunction
  function automatic bit hit(int p, int r, int c);
    return pm.exists(key(p, r, c));
  endfunction
  function automatic void set_hit(int p, int r, int c);
    pm[key(p, r, c)] = 1'b1;
  endfunction
  function automatic void clear_hit(int p, int r, int c);
    if (pm.exists(key(p, r, c))) pm.delete(key(p, r, c));
  endfunction

  // pads hardwired to cell (r, c)
  function automatic own_pads_t own(int r, int c);
    own_pads_t o;
    o = '0;
    for (int i = 0; i < 11; i++) o.mu1[i] = hit(0, r, 5 * c - 3 + i);
    for (int i = 0; i < 5; i++) begin
      o.mu2[i] = hit(1, r, 5 * c + i);
      o.mu3[i] = hit(2, r, 5 * c + i);
      o.mu4[i] = hit(3, r, 5 * c + i);
      o.mu5[i] = hit(4, r, 5 * c + i);
    end
    return o;
  endfunction

  function automatic logic [15:0] word(own_pads_t o, int w);
    logic [30:0] b;
    b = o;
    return (w == 0) ? b[15:0] : {1'b0, b[30:16]};
  endfunction

  function automatic bit is_triple(int r, int col);
    bit a4, a5;
    a4 = 0; a5 = 0;
    for (int dr = -1; dr <= 1; dr++) begin
      for (int dx = -1; dx <= 1; dx++) if (hit(3, r + dr, col + dx)) a4 = 1;
      for (int dx = -2; dx <= 2; dx++) if (hit(4, r + dr, col + dx)) a5 = 1;
    end
    return hit(2, r, col) && a4 && a5;
  endfunction

  function automatic cand_t exp_cand(int r, int col, logic [BCID_W-1:0] bcid);
    cand_t e;
    e = '0;
    e.bcid = bcid;
    e.row = ROW_W'(r);
    e.col = COL_W'(col);
    e.triple = is_triple(r, col);
    for (int i = 0; i < 17; i++) e.mu1[i] = hit(0, r, col - 8 + i);
    for (int i = 0; i < 5; i++) e.mu2[i] = hit(1, r, col - 2 + i);
    for (int dr = 0; dr < 3; dr++) begin
      for (int i = 0; i < 3; i++) e.mu4[dr][i] = hit(3, r - 1 + dr, col - 1 + i);
      for (int i = 0; i < 5; i++) e.mu5[dr][i] = hit(4, r - 1 + dr, col - 2 + i);
    end
    return e;
  endfunction

  // Fill the map with sparse noise: mu2..mu5 over rows [0, rows) and
  // columns [0, ncol), mu1 over columns [0, ncol1); then add `ntracks`
  // muon-like tracks: a mu3 seed in columns [0, seedcols) with hits in
  // mu4 and mu5 (three times in four), mu2 and mu1 near it. Pads outside
  // those ranges are removed, since no cell reads them.
  function automatic void random_map(int rows, int seedcols, int ncol, int ncol1,
                                     int noise_permille, int ntracks);
    pm.delete();
    for (int p = 0; p < 5; p++)
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < ((p == 0) ? ncol1 : ncol); c++)
          if ($urandom_range(0, 999) < noise_permille) set_hit(p, r, c);
    for (int t = 0; t < ntracks; t++) begin
      int r, c;
      r = $urandom_range(0, rows - 1);
      c = $urandom_range(0, seedcols - 1);
      set_hit(2, r, c);
      if ($urandom_range(0, 3) != 0) begin
        set_hit(3, r + $urandom_range(0, 2) - 1, c + $urandom_range(0, 2) - 1);
        set_hit(4, r + $urandom_range(0, 2) - 1, c + $urandom_range(0, 4) - 2);
      end
      set_hit(1, r, c + $urandom_range(0, 4) - 2);
      set_hit(0, r, c + $urandom_range(0, 16) - 8);
    end
    begin
      int gone [$];
      foreach (pm[k]) begin
        int pp, rr, cc;
        pp = k / 1000000;
        rr = (k % 1000000) / 1000 - 100;
        cc = k % 1000 - 100;
        if (rr < 0 || rr >= rows || cc < 0 || cc >= ((pp == 0) ? ncol1 : ncol)) gone.push_back(k);
      end
      foreach (gone[i]) pm.delete(gone[i]);
    end
  endfunction

  function automatic longint rnd(input longint a, input longint b);
    return (a + b / 2) / b;
  endfunction

  // Second-stack result for one record (geometry of the default design).
  function automatic result_t s2_model(input cand_t c, input int x_span, input int y_span,
                                       input logic [31:0] ptm, input logic [31:0] ycut);
    localparam int Z1 = 12150, Z2 = 15500, Z3 = 16600, PX = 10000, PY = 20000, KICK = 1200;
    result_t r;
    longint aq, bq, hs, best, bj, bi;
    bit f;
    r = '0;
    aq = rnd(longint'(Z2) * (Z3 - Z1) * 65536, longint'(Z1) * (Z3 - Z2));
    bq = -rnd(longint'(Z3) * (Z2 - Z1) * 65536, longint'(Z1) * (Z3 - Z2));
    hs = 2 * longint'(c.col) + 1 - x_span;
    f = 0; best = 0; bj = 0; bi = 0;
    for (int j = 0; j < 5; j++) begin
      if (c.mu2[j]) begin
        longint e;
        e = (hs + 2 * (j - 2)) * aq + hs * bq;
        for (int i = 0; i < 17; i++) begin
          if (c.mu1[i]) begin
            longint d;
            d = (hs + 2 * (i - 8)) * 65536 - e;
            if (d < 0) d = -d;
            if (!f || d < best) begin
              f = 1; best = d; bj = j; bi = i;
            end
          end
        end
      end
    end
    r.bcid = c.bcid; r.row = c.row; r.col = c.col; r.found = f;
    if (f) begin
      longint x1, x2, y1, y2, hy, tx, ty, t1, d, y0, ad;
      logic [31:0] pt;
      hy = 2 * longint'(c.row) + 1 - y_span;
      x1 = ((hs + 2 * (bi - 8)) * (longint'(PX) * 32768)) >>> 16;
      x2 = ((hs + 2 * (bj - 2)) * rnd(longint'(PX) * Z2 * 32768, Z1)) >>> 16;
      y1 = (hy * (longint'(PY) * 32768)) >>> 16;
      y2 = (hy * rnd(longint'(PY) * Z2 * 32768, Z1)) >>> 16;
      tx = ((x2 - x1) * rnd(64'd65536000, Z2 - Z1)) >>> 16;
      ty = ((y2 - y1) * rnd(64'd65536000, Z2 - Z1)) >>> 16;
      t1 = (x1 * rnd(64'd65536000, Z1)) >>> 16;
      d  = tx - t1;
      y0 = y1 - ((ty * rnd(longint'(Z1) * 65536, 1000)) >>> 16);
      ad = d < 0 ? -d : d;
      begin
        longint r1, q, v;
        v = x1 * x1 + y1 * y1;
        r1 = longint'($floor($sqrt(real'(v))));
        while (r1 * r1 > v) r1--;
        while ((r1 + 1) * (r1 + 1) <= v) r1++;
        q = (ad == 0) ? -1 : (r1 * KICK * 1000) / (longint'(Z1) * ad);
        pt = (q < 0 || q > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : 32'(q);
      end
      r.mu2_off = 5'(bj); r.mu1_off = 5'(bi);
      r.tx_urad = 32'(tx); r.ty_urad = 32'(ty); r.y0_um = 32'(y0);
      r.pt_mev = pt;
      r.y0_ok = ((y0 < 0 ? -y0 : y0) <= longint'(ycut));
      r.pt_ok = (pt >= ptm);
      r.accept = r.y0_ok && r.pt_ok;
    end
    return r;
  endfunction
endpackage
