// fv_ref_pkg: reference models for the testbenches of the frequent-value bus
// codecs. Written independently of the RTL: a table is a list of slots with
// a last-use time (a global counter) instead of age ranks, and the encoders
// are plain integer arithmetic on 64-bit values.
//
//   lru_model        : LRU table; empty slots fill lowest index first, then
//                      the slot with the oldest last use is replaced
//   enc_fvi          : expected code of an FV-i word
//   enc_fv_msb_lsb   : expected code of an FV-MSB-LSB word
//   enc_fv_i_msb_j   : expected code of an FV-i-MSB-j word
//   gen_word         : stimulus with whole-word, MSB and LSB locality
// Code kinds use the numbering of fvbus_pkg::code_kind_e (0 raw, 1 FV,
// 2 MSB, 3 LSB, 4 MSB+LSB).
package fv_ref_pkg;

  class lru_model;
    int          n;
    longint      val[];
    bit          vld[];
    longint      last[];
    longint      now;

    function new(int entries);
      n    = entries;
      val  = new[entries];
      vld  = new[entries];
      last = new[entries];
      now  = 0;
      foreach (vld[i]) begin
        vld[i]  = 0;
        val[i]  = 0;
        last[i] = 0;
      end
    endfunction

    // Slot holding key, or -1.
    function int find(longint key);
      for (int i = 0; i < n; i++) if (vld[i] && val[i] == key) return i;
      return -1;
    endfunction

    // Record one use of key: touch on a hit, replace on a miss.
    function void update(longint key);
      int s;
      s = find(key);
      if (s < 0) begin
        for (int i = n - 1; i >= 0; i--) if (!vld[i]) s = i;
        if (s < 0) begin
          s = 0;
          for (int i = 1; i < n; i++) if (last[i] < last[s]) s = i;
        end
        val[s] = key;
        vld[s] = 1;
      end
      now++;
      last[s] = now;
    endfunction
  endclass

  function automatic int ones(longint v);
    int c = 0;
    for (int i = 0; i < 64; i++) if (v[i]) c++;
    return c;
  endfunction

  function automatic longint mask(int bits);
    return (bits >= 64) ? -1 : ((longint'(1) << bits) - 1);
  endfunction

  // FV-i: k lines, m control lines; the first table portion is sent as all
  // ones on the control lines.
  function automatic void enc_fvi(lru_model t, int k, int m, longint d,
                                  output longint code, output bit enc, output int kind);
    int h = t.find(d);
    if (h < 0) begin
      code = d; enc = 0; kind = 0;
    end else begin
      code = (longint'(1) << (m + h % (k - m))) | ((2 ** m - 1) - h / (k - m));
      enc  = 1; kind = 1;
    end
  endfunction

  // FV-MSB-LSB with an r-bit MSB part.
  function automatic void enc_fv_msb_lsb(lru_model fv, lru_model mt, lru_model lt,
                                         int k, int r, longint d,
                                         output longint code, output bit enc, output int kind);
    int     l  = k - r;
    longint hi = (d >> l) & mask(r);
    longint lo = d & mask(l);
    int     hf = fv.find(d);
    int     hm = mt.find(hi);
    int     hl = lt.find(lo);
    enc = 1;
    if (hf >= 0) begin
      code = longint'(1) << hf; kind = 1;
    end else if (hm >= 0 && hl >= 0) begin
      code = (longint'(1) << (hm + l)) | (longint'(1) << hl); kind = 4;
    end else if (hm >= 0 && ones(lo) >= 2) begin
      code = (longint'(1) << (hm + l)) | lo; kind = 2;
    end else if (hl >= 0 && ones(hi) >= 2) begin
      code = (hi << l) | (longint'(1) << hl); kind = 3;
    end else begin
      code = d; enc = 0; kind = 0;
    end
  endfunction

  // FV-i-MSB-j: FV table enlarged by fi, MSB table by fj (powers of two).
  function automatic void enc_fv_i_msb_j(lru_model fv, lru_model mt,
                                         int k, int fi, int fj, int r, longint d,
                                         output longint code, output bit enc, output int kind);
    int     l  = k - r;
    int     mf = $clog2(fi);
    int     mm = $clog2(fj);
    longint hi = (d >> l) & mask(r);
    int     hf = fv.find(d);
    int     hm = mt.find(hi);
    longint mc;
    enc = 1;
    if (hf >= 0) begin
      code = (longint'(1) << (mf + hf % (k - mf))) | ((fi - 1) - hf / (k - mf));
      kind = 1;
    end else begin
      mc = ((longint'(1) << (mm + hm % (r - mm))) | ((fj - 1) - hm / (r - mm))) << l;
      mc = mc | (d & mask(l));
      if (hm >= 0 && ones(mc >> mf) != 1) begin
        code = mc; kind = 2;
      end else begin
        code = d; enc = 0; kind = 0;
      end
    end
  endfunction

  // A word with locality: a repeat of one of nfv frequent words, a frequent
  // high part (one of nhi, r bits) with a random low part, a random high part
  // with a frequent low part (one of nlo), both parts frequent, or random.
  function automatic longint gen_word(int k, int r, int nfv, int nhi, int nlo);
    int     l   = k - r;
    int     sel = $urandom_range(99);
    longint hi, lo;
    if (sel < 35) return (longint'($urandom_range(nfv - 1)) * 64'h9E3779B97F4A7C15 >> 7) & mask(k);
    hi = (longint'($urandom_range(nhi - 1)) * 64'hC2B2AE3D27D4EB4F >> 11) & mask(r);
    lo = (longint'($urandom_range(nlo - 1)) * 64'h165667B19E3779F9 >> 13) & mask(l);
    if (sel < 55) lo = longint'($urandom()) & mask(l);
    else if (sel < 75) hi = longint'($urandom()) & mask(r);
    else if (sel < 90) ;
    else return longint'({$urandom(), $urandom()}) & mask(k);
    return (hi << l) | lo;
  endfunction

endpackage
