// cavlc_ref_pkg -- behavioural CAVLC reference for the testbenches.
//
// ref_encode codes one zig-zag ordered 4x4 block into a queue of bits, written
// straight from the H.264 CAVLC rules (loops over integers, no hardware
// structure). ref_decode is the matching CAVLC decoder: it parses one block
// from a bit queue by prefix matching against the code tables, and is used to
// turn the serial output of the whole processor back into coefficients.
// ref_nc gives the context nC of a block from the non-zero counts of the blocks
// already coded in the picture (left and upper neighbours, across macroblock
// edges, as H.264 defines it), working on picture coordinates rather than on
// the design's edge buffers. The code tables are those of
// cavlc_pkg; a few codes are also checked against literal bit strings by the
// encoder testbench.
package cavlc_ref_pkg;
  import cavlc_pkg::*;

  typedef bit bitq_t[$];

  function automatic void put(ref bitq_t q, input int unsigned v, input int len);
    for (int i = len - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  function automatic void ct_code(input int nc, input int tc, input int t1,
                                  output int len, output int bits);
    int tab;
    tab = (nc < 2) ? 0 : (nc < 4) ? 1 : (nc < 8) ? 2 : 3;
    if (tab == 3) begin
      len  = 6;
      bits = (tc == 0) ? 3 : (((tc - 1) << 2) | t1);
    end else begin
      len  = int'(CT_LEN[tab][tc*4 + t1]);
      bits = int'(CT_BITS[tab][tc*4 + t1]);
    end
  endfunction

  function automatic bitq_t ref_encode(input int c[16], input int nc);
    bitq_t q;
    int nzv[$], nzp[$];
    int tc, t1, tz, len, bits, sl, zl;
    q = {};
    for (int k = 15; k >= 0; k--) if (c[k] != 0) begin nzv.push_back(c[k]); nzp.push_back(k); end
    tc = nzv.size();
    t1 = 0;
    for (int i = 0; i < tc && i < 3; i++) begin
      if (nzv[i] == 1 || nzv[i] == -1) t1++; else break;
    end
    ct_code(nc, tc, t1, len, bits);
    put(q, bits, len);
    if (tc == 0) return q;
    for (int i = 0; i < t1; i++) q.push_back(nzv[i] < 0);
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      int lc, a, prefix, sbits, suf;
      a  = (nzv[i] < 0) ? -nzv[i] : nzv[i];
      lc = (nzv[i] > 0) ? 2*nzv[i] - 2 : -2*nzv[i] - 1;
      if (i == t1 && t1 < 3) lc -= 2;
      if (sl == 0 && lc < 14)       begin prefix = lc; sbits = 0; suf = 0; end
      else if (sl == 0 && lc < 30)  begin prefix = 14; sbits = 4; suf = lc - 14; end
      else if (sl == 0)             begin prefix = 15; sbits = 12; suf = lc - 30; end
      else if (lc < (15 << sl))     begin prefix = lc >> sl; sbits = sl; suf = lc % (1 << sl); end
      else                          begin prefix = 15; sbits = 12; suf = lc - (15 << sl); end
      put(q, 0, prefix);
      q.push_back(1'b1);
      put(q, suf, sbits);
      if (sl == 0) sl = 1;
      if (a > (3 << (sl - 1)) && sl < 6) sl++;
    end
    tz = nzp[0] + 1 - tc;
    if (tc < 16) put(q, TZ_BITS[tc-1][tz], TZ_LEN[tc-1][tz]);
    zl = tz;
    for (int i = 0; i < tc - 1 && zl > 0; i++) begin
      int run, row;
      run = nzp[i] - nzp[i+1] - 1;
      row = (zl > 7) ? 6 : zl - 1;
      put(q, RB_BITS[row][run], RB_LEN[row][run]);
      zl -= run;
    end
    return q;
  endfunction

  function automatic int unsigned take(ref bitq_t q, input int n);
    int unsigned v = 0;
    for (int i = 0; i < n; i++) v = (v << 1) | int'(q.pop_front());
    return v;
  endfunction

  // does q start with the code (len, bits)?
  function automatic bit starts(ref bitq_t q, input int len, input int bits);
    if (len == 0 || q.size() < len) return 0;
    for (int i = 0; i < len; i++) if (q[i] != bit'((bits >> (len - 1 - i)) & 1)) return 0;
    return 1;
  endfunction

  // Decode one block from the front of q; returns 0 on a parse error.
  function automatic bit ref_decode(ref bitq_t q, input int nc, output int c[16]);
    int tc, t1, len, bits, sl, tz, zl, pos;
    int lv[16], run[16];
    bit found;
    for (int i = 0; i < 16; i++) c[i] = 0;
    found = 0; tc = 0; t1 = 0;
    for (int a = 0; a <= 16 && !found; a++)
      for (int b = 0; b <= 3 && b <= a && !found; b++) begin
        ct_code(nc, a, b, len, bits);
        if (starts(q, len, bits)) begin found = 1; tc = a; t1 = b; void'(take(q, len)); end
      end
    if (!found) return 0;
    if (tc == 0) return 1;
    for (int i = 0; i < t1; i++) lv[i] = take(q, 1) ? -1 : 1;
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      int prefix, lc, a;
      prefix = 0;
      while (q.size() > 0 && q[0] == 0) begin void'(take(q, 1)); prefix++; end
      if (q.size() == 0 || prefix > 15) return 0;
      void'(take(q, 1));
      if (sl == 0 && prefix < 14)  lc = prefix;
      else if (sl == 0 && prefix == 14) lc = 14 + int'(take(q, 4));
      else if (sl == 0)            lc = 30 + int'(take(q, 12));
      else if (prefix < 15)        lc = (prefix << sl) + int'(take(q, sl));
      else                         lc = (15 << sl) + int'(take(q, 12));
      if (i == t1 && t1 < 3) lc += 2;
      lv[i] = (lc % 2 == 0) ? (lc + 2) / 2 : -(lc + 1) / 2;
      a = (lv[i] < 0) ? -lv[i] : lv[i];
      if (sl == 0) sl = 1;
      if (a > (3 << (sl - 1)) && sl < 6) sl++;
    end
    tz = 0;
    if (tc < 16) begin
      found = 0;
      for (int z = 0; z <= 16 - tc && !found; z++)
        if (starts(q, TZ_LEN[tc-1][z], TZ_BITS[tc-1][z])) begin
          found = 1; tz = z; void'(take(q, TZ_LEN[tc-1][z]));
        end
      if (!found) return 0;
    end
    zl = tz;
    for (int i = 0; i < tc - 1; i++) begin
      run[i] = 0;
      if (zl > 0) begin
        int row;
        row = (zl > 7) ? 6 : zl - 1;
        found = 0;
        for (int r = 0; r <= zl && r < 15 && !found; r++)
          if (starts(q, RB_LEN[row][r], RB_BITS[row][r])) begin
            found = 1; run[i] = r; void'(take(q, RB_LEN[row][r]));
          end
        if (!found) return 0;
        zl -= run[i];
      end
    end
    run[tc-1] = zl;
    pos = tc + tz - 1;
    for (int i = 0; i < tc; i++) begin
      c[pos] = lv[i];
      pos = pos - 1 - run[i];
    end
    return 1;
  endfunction

  // Non-zero counts of a picture, one entry of 24 per macroblock in raster
  // order (entries of blocks not yet coded are never read).
  typedef int mb_nz_t[24];

  // count of the luma 4x4 block at picture position (gx, gy), in 4x4 units
  function automatic int luma_at(ref mb_nz_t pic[$], input int mbw, input int gx, input int gy);
    int x, y;
    x = gx % 4; y = gy % 4;
    return pic[(gy / 4) * mbw + gx / 4][(y >> 1) * 8 + (x >> 1) * 4 + (y & 1) * 2 + (x & 1)];
  endfunction

  // count of the chroma block of component c at (gx, gy), in 4x4 chroma units
  function automatic int chroma_at(ref mb_nz_t pic[$], input int mbw, input int c, input int gx, input int gy);
    return pic[(gy / 2) * mbw + gx / 2][16 + 4 * c + (gy % 2) * 2 + gx % 2];
  endfunction

  // nC of block blk (0..23) of macroblock (mbx, mby) in a picture mbw
  // macroblocks wide: left (nA) and upper (nB) neighbours, across macroblock
  // edges too, inside the picture
  function automatic int ref_nc(ref mb_nz_t pic[$], input int mbw, input int mbx, input int mby, input int blk);
    int gx, gy, na, nb;
    bit av_a, av_b;
    if (blk < 16) begin
      gx = mbx * 4 + ((blk >> 2) & 1) * 2 + (blk & 1);
      gy = mby * 4 + ((blk >> 3) & 1) * 2 + ((blk >> 1) & 1);
      av_a = gx > 0; av_b = gy > 0;
      na = av_a ? luma_at(pic, mbw, gx - 1, gy) : 0;
      nb = av_b ? luma_at(pic, mbw, gx, gy - 1) : 0;
    end else begin
      int c, b;
      c = (blk < 20) ? 0 : 1;
      b = blk - 16 - 4 * c;
      gx = mbx * 2 + (b & 1);
      gy = mby * 2 + (b >> 1);
      av_a = gx > 0; av_b = gy > 0;
      na = av_a ? chroma_at(pic, mbw, c, gx - 1, gy) : 0;
      nb = av_b ? chroma_at(pic, mbw, c, gx, gy - 1) : 0;
    end
    if (av_a && av_b) return (na + nb + 1) >> 1;
    if (av_a) return na;
    if (av_b) return nb;
    return 0;
  endfunction

  // a random quantized block in zig-zag order: mostly sparse, sometimes dense,
  // sometimes with large (escape-coded) levels
  function automatic void rand_block(output int c[16], input int kind);
    for (int k = 0; k < 16; k++) begin
      int r;
      r = $urandom_range(99);
      c[k] = 0;
      case (kind)
        0: c[k] = 0;                                                   // empty
        1: if (r < 35 - 2*k) c[k] = ($urandom_range(1) ? 1 : -1) * ((r < 10) ? int'($urandom_range(6, 1)) : 1);
        2: c[k] = ($urandom_range(1) ? 1 : -1) * int'($urandom_range(40, 1));   // dense
        3: if (r < 50) c[k] = int'($urandom_range(4095)) - 2048;          // large
        default: if (r < 60) c[k] = int'($urandom_range(8)) - 4;
      endcase
    end
  endfunction

endpackage
