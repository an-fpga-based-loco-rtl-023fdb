// loco_ref_pkg: behavioural reference models used by the testbenches.
//
// * build_tables(): a set of valid tANS encoding tables (state size 64) for the
//   15 z distributions and 32 y distributions, plus C = 2^log2c for each z
//   table. The frequencies are simple integer approximations of geometric
//   and Bernoulli laws; any valid tables exercise the coder equally well.
//   Table construction: symbols are spread over the 64 slots with step 41
//   (coprime to 64); the j-th slot of symbol s is the target of the reduced
//   state x_s = f_s + j, and coding s from state x emits nb bits where nb is
//   the smallest shift with (x >> nb) < 2 f_s.
// * decorrelate(): the decorrelator written straight from the JPEG-LS
//   equations (division for the quantizer, reconstruction from the quantized
//   error) rather than from tables.
// * theta_of(): the St quantizer.
// * code_lane(): block reversal, subsymbol decomposition, tANS coding,
//   LSB-first byte packing and per-block byte reversal of one coder lane.
package loco_ref_pkg;
  import loco_ans_pkg::*;

  localparam int L = 1 << STATE_BITS;

  tans_entry_t zt [15][16][L];
  tans_entry_t yt [32][2][L];
  int          log2c [15];

  function automatic void build_one(input int nsym, input int f [16], output tans_entry_t t [16][L]);
    int slot_sym [L];
    int pos, cnt [16], xs, nb;
    pos = 0;
    for (int s = 0; s < nsym; s++)
      for (int j = 0; j < f[s]; j++) begin
        slot_sym[pos] = s;
        pos = (pos + 41) % L;
      end
    for (int s = 0; s < 16; s++) begin
      cnt[s] = 0;
      for (int x = 0; x < L; x++) t[s][x] = '0;
    end
    for (int s = 0; s < nsym; s++) begin
      int slot_of [L];
      int k;
      k = 0;
      for (int i = 0; i < L; i++) if (slot_sym[i] == s) begin slot_of[k] = i; k++; end
      for (int x = L; x < 2 * L; x++) begin
        nb = 0;
        while ((x >> nb) >= 2 * f[s]) nb++;
        xs = x >> nb;
        t[s][x - L].nbits = NBITS_W'(nb);
        t[s][x - L].next  = STATE_BITS'(slot_of[xs - f[s]]);
      end
    end
  endfunction

  function automatic void build_tables();
    int f [16];
    tans_entry_t t [16][L];
    for (int i = 0; i < 15; i++) begin
      int c, r;
      log2c[i] = (i < 2) ? 0 : (i < 5) ? 1 : (i < 9) ? 2 : 3;
      c = 1 << log2c[i];
      for (int s = 0; s < 16; s++) f[s] = 0;
      for (int s = 0; s <= c; s++) f[s] = 1;
      r = L - (c + 1);
      for (int s = 0; s < c; s++) begin
        int g;
        g = r / 2;
        f[s] += g;
        r -= g;
      end
      f[c] += r;
      build_one(c + 1, f, t);
      zt[i] = t;
    end
    for (int p = 0; p < 32; p++) begin
      for (int s = 0; s < 16; s++) f[s] = 0;
      f[1] = 2 * p + 1;
      f[0] = L - f[1];
      build_one(2, f, t);
      yt[p][0] = t[0];
      yt[p][1] = t[1];
    end
  endfunction

  // ---------------- decorrelator ----------------
  function automatic int qg(int g, int t1, int t2, int t3, int n);
    if (g <= -t3) return -4;
    if (g <= -t2) return -3;
    if (g <= -t1) return -2;
    if (g < -n)   return -1;
    if (g <= n)   return 0;
    if (g < t1)   return 1;
    if (g < t2)   return 2;
    if (g < t3)   return 3;
    return 4;
  endfunction

  // img is row-major, w x h. Returns the symbols; also counts how often two
  // consecutive coded pixels share a context.
  function automatic void decorrelate(input int img [], input int w, input int h, input int n,
                                      output dec_sym_t syms [$], output int same_ctx);
    int rec [];
    int cc [365], bb [365], tt [365], ss [365];
    int rng, t1, t2, t3, maxe, st0, prev_ctx;
    rec = new[w * h];
    rng = (255 + 2 * n) / (2 * n + 1) + 1;
    t1 = 3 + 3 * n; t2 = 7 + 5 * n; t3 = 21 + 7 * n;
    maxe = (rng + 1) / 2 - 1;
    st0 = ((rng + 32) / 64 > 2) ? (rng + 32) / 64 : 2;
    for (int i = 0; i < 365; i++) begin cc[i] = 0; bb[i] = 0; tt[i] = 1; ss[i] = st0; end
    syms = {};
    same_ctx = 0;
    prev_ctx = -1;
    rec[0] = img[0];
    for (int i = 1; i < w * h; i++) begin
      int r, c, a, b, cn, d, q1, q2, q3, sg, ctx, px, e, q, rx, y, z, pq, cv, tn;
      dec_sym_t sy;
      r = i / w; c = i % w;
      if (r == 0) begin
        b = 0; cn = 0; d = 0; a = rec[i - 1];
      end else begin
        b = rec[i - w];
        cn = (c == 0) ? ((r >= 2) ? rec[(r - 2) * w] : 0) : rec[i - w - 1];
        d = (c == w - 1) ? b : rec[i - w + 1];
        a = (c == 0) ? b : rec[i - 1];
      end
      q1 = qg(d - b, t1, t2, t3, n); q2 = qg(b - cn, t1, t2, t3, n); q3 = qg(cn - a, t1, t2, t3, n);
      sg = (q1 < 0 || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0)) ? 1 : 0;
      if (sg == 1) begin q1 = -q1; q2 = -q2; q3 = -q3; end
      ctx = q1 * 81 + q2 * 9 + q3;
      if (ctx == prev_ctx) same_ctx++;
      prev_ctx = ctx;
      if (cn >= ((a > b) ? a : b))      px = (a < b) ? a : b;
      else if (cn <= ((a < b) ? a : b)) px = (a > b) ? a : b;
      else                              px = a + b - cn;
      px = px + (sg == 1 ? -cc[ctx] : cc[ctx]);
      if (px < 0) px = 0; if (px > 255) px = 255;
      e = img[i] - px;
      if (sg == 1) e = -e;
      if (e > 0) q = (n + e) / (2 * n + 1); else q = -((n - e) / (2 * n + 1));
      rx = px + (sg == 1 ? -q : q) * (2 * n + 1);
      if (rx < 0) rx = 0; if (rx > 255) rx = 255;
      rec[i] = rx;
      if (q < 0) q += rng;
      if (q > maxe) q -= rng;
      y = (q < 0) ? 1 : 0;
      z = (q < 0) ? -q - 1 : q;
      pq = (-bb[ctx] * 32) / tt[ctx];
      if (pq > 31) pq = 31;
      sy.last = (i == w * h - 1);
      sy.y = y[0];
      sy.z = Z_BITS'(z);
      sy.p_q = P_BITS'(pq);
      sy.t = T_BITS'(tt[ctx]);
      sy.st = ST_BITS'(ss[ctx]);
      syms.push_back(sy);
      // context update
      bb[ctx] += q * (2 * n + 1);
      ss[ctx] += z;
      tn = tt[ctx];
      if (tn == 64) begin bb[ctx] = bb[ctx] >>> 1; ss[ctx] = ss[ctx] >> 1; tn = tn >> 1; end
      tn++;
      tt[ctx] = tn;
      cv = cc[ctx];
      if (bb[ctx] <= -tn) begin
        bb[ctx] += tn;
        if (cv > -128) cv--;
        if (bb[ctx] <= -tn) bb[ctx] = -tn + 1;
      end else if (bb[ctx] > 0) begin
        bb[ctx] -= tn;
        if (cv < 127) cv++;
        if (bb[ctx] > 0) bb[ctx] = 0;
      end
      cc[ctx] = cv;
    end
  endfunction

  function automatic int theta_of(input int st, input int t, input int max_id);
    int th;
    th = 0;
    for (int i = 1; i <= max_id; i++) if (st > (t << (i - 1))) th = i;
    return th;
  endfunction

  function automatic tsg_sym_t to_tsg(input dec_sym_t d);
    tsg_sym_t s;
    s.last = d.last; s.y = d.y; s.z = d.z; s.p_q = d.p_q;
    s.theta_q = THETA_BITS'(theta_of(int'(d.st), int'(d.t), 14));
    return s;
  endfunction

  // ---------------- one coder lane ----------------
  // Subsymbols of one symbol: kind, value, table.
  function automatic void subsyms(input tsg_sym_t s, input int ni, output int k [$], output int v [$], output int tb [$]);
    int c, n, z0;
    k = {}; v = {}; tb = {};
    c = 1 << log2c[s.theta_q];
    n = int'(s.z) / c; z0 = int'(s.z) % c;
    k.push_back(0); v.push_back(int'(s.y)); tb.push_back(int'(s.p_q));
    if (n + 1 > ni) begin
      for (int j = 0; j < ni + 1; j++) begin k.push_back(1); v.push_back(c); tb.push_back(int'(s.theta_q)); end
      k.push_back(2); v.push_back(int'(s.z)); tb.push_back(0);
    end else begin
      k.push_back(1); v.push_back(z0); tb.push_back(int'(s.theta_q));
      for (int j = 0; j < n; j++) begin k.push_back(1); v.push_back(c); tb.push_back(int'(s.theta_q)); end
    end
  endfunction

  // Codes of one block of symbols given in coding order (already reversed).
  function automatic void code_block(input tsg_sym_t blk [$], input int ni, output int cbits [$], output int clen [$]);
    int st;
    cbits = {}; clen = {};
    st = 0;
    foreach (blk[i]) begin
      int k [$], v [$], tb [$];
      subsyms(blk[i], ni, k, v, tb);
      foreach (k[j]) begin
        if (k[j] == 2) begin
          cbits.push_back(v[j]); clen.push_back(8);
        end else begin
          tans_entry_t e;
          e = (k[j] == 0) ? yt[tb[j]][v[j]][st] : zt[tb[j]][v[j]][st];
          cbits.push_back(st & ((1 << int'(e.nbits)) - 1)); clen.push_back(int'(e.nbits));
          st = int'(e.next);
        end
      end
    end
    cbits.push_back(st); clen.push_back(STATE_BITS);
  endfunction

  function automatic void pack(input int cbits [$], input int clen [$], output int bytes [$]);
    int acc, cnt;
    bytes = {}; acc = 0; cnt = 0;
    foreach (cbits[i]) begin
      acc |= (cbits[i] & ((1 << clen[i]) - 1)) << cnt;
      cnt += clen[i];
      while (cnt >= 8) begin bytes.push_back(acc & 255); acc >>= 8; cnt -= 8; end
    end
    if (cnt > 0) bytes.push_back(acc & 255);
  endfunction

  // Whole lane: symbols in decorrelator order -> output bytes, with the number
  // of blocks, escapes and subsymbols seen.
  function automatic void code_lane(input tsg_sym_t syms [$], input int bs, input int ni,
                                    output int bytes [$], output int nblk, output int nesc, output int nsub);
    tsg_sym_t blk [$];
    bytes = {}; nblk = 0; nesc = 0; nsub = 0;
    for (int i = 0; i < syms.size(); i++) begin
      blk.push_front(syms[i]);
      if (blk.size() == bs || syms[i].last || i == syms.size() - 1) begin
        int cb [$], cl [$], by [$];
        foreach (blk[j]) begin
          int k [$], v [$], tb [$];
          subsyms(blk[j], ni, k, v, tb);
          nsub += k.size();
          if (k[k.size() - 1] == 2) nesc++;
        end
        code_block(blk, ni, cb, cl);
        pack(cb, cl, by);
        for (int j = by.size() - 1; j >= 0; j--) bytes.push_back(by[j]);
        nblk++;
        blk = {};
      end
    end
  endfunction

endpackage
