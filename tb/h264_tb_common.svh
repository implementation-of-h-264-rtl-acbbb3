// Shared testbench code for the decoder-level testbenches: a generator of
// H.264 byte streams within the supported subset, and a reference model that
// decodes what it generated (intra prediction, reconstruction with zero
// residual, deblocking) so the decoder output can be compared word by word.
//
// The generator writes SPS, PPS, SEI/delimiter units (to be skipped) and one
// slice per picture. Macroblocks are picked at random among I_PCM, I_16x16
// (all four luma modes, all four chroma modes, only modes whose neighbours
// exist) and I_4x4 (modes vertical, horizontal, DC per block, coded against
// the predicted mode). mb_qp_delta, the slice qp, chroma_qp_index_offset and
// the deblocking offsets are random. Emulation prevention bytes are inserted
// wherever the payload requires them; I_PCM samples are biased towards zero
// so that this happens often.
// Included inside a testbench module; it uses no module ports.

  // ---------------- byte stream ----------------
  byte unsigned stream [$];
  bit           rbsp [$];
  int           n_emul;            // emulation prevention bytes inserted

  task automatic put_bits(input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) rbsp.push_back(v[i]);
  endtask
  task automatic put_ue(input int unsigned v);
    int unsigned x = v + 1;
    int nb = $clog2(x + 1) - 1;   // index of the leading one
    put_bits(0, nb);
    put_bits(x, nb + 1);
  endtask
  task automatic put_se(input int v);
    put_ue(v > 0 ? 2 * v - 1 : -2 * v);
  endtask
  task automatic trailing();
    rbsp.push_back(1'b1);
    while (rbsp.size() % 8 != 0) rbsp.push_back(1'b0);
  endtask
  // NAL unit with a start code; the payload is the rbsp bit queue
  task automatic emit_nal(input int ref_idc, input int typ, input bit long_start);
    int zeros = 0;
    byte unsigned b;
    if (long_start) stream.push_back(8'h00);
    stream.push_back(8'h00); stream.push_back(8'h00); stream.push_back(8'h01);
    stream.push_back(8'((ref_idc << 5) | typ));
    for (int i = 0; i < rbsp.size(); i += 8) begin
      b = 0;
      for (int k = 0; k < 8; k++) b = {b[6:0], rbsp[i+k]};
      if (zeros >= 2 && b <= 8'h03) begin
        stream.push_back(8'h03); zeros = 0; n_emul++;
      end
      stream.push_back(b);
      zeros = (b == 0) ? zeros + 1 : 0;
    end
    rbsp.delete();
  endtask

  // ---------------- reference picture ----------------
  int mbw, mbh;
  int ry [], rcb [], rcr [];            // reconstructed, then deblocked
  int mb_kind [];                       // 0 I4x4, 1 I16x16, 2 I_PCM
  int mb_qp [];
  int i4_mode [];                       // per 4x4 block, raster over the picture
  int chroma_off, a_off2, b_off2, dbk_idc;
  int n_pcm, n_i16, n_i4, n_i16_mode [4], n_c_mode [4], n_i4_mode [3];

  function automatic int clip1(input int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction
  function automatic int pix(input int pl, input int x, input int y);
    if (pl == 0) return ry[y * mbw * 16 + x];
    else if (pl == 1) return rcb[y * mbw * 8 + x];
    else return rcr[y * mbw * 8 + x];
  endfunction
  task automatic setpix(input int pl, input int x, input int y, input int v);
    if (pl == 0) ry[y * mbw * 16 + x] = v;
    else if (pl == 1) rcb[y * mbw * 8 + x] = v;
    else rcr[y * mbw * 8 + x] = v;
  endtask

  // whole-block (16x16 luma or 8x8 chroma) prediction, modes numbered as in
  // the luma syntax: 0 V, 1 H, 2 DC, 3 plane (chroma is remapped by caller)
  task automatic pred_block(input int pl, input int x0, input int y0, input int n, input int mode);
    bit ta = y0 > 0, la = x0 > 0;
    int sh = (n == 16) ? 5 : 3, hh, vv, a, b, c, st, sl, dc;
    for (int by = 0; by < n; by += (n == 16 ? 16 : 4))
      for (int bx = 0; bx < n; bx += (n == 16 ? 16 : 4)) begin
        int m = (n == 16) ? 16 : 4;
        st = 0; sl = 0;
        for (int i = 0; i < m; i++) begin
          if (ta) st += pix(pl, x0 + bx + i, y0 - 1);
          if (la) sl += pix(pl, x0 - 1, y0 + by + i);
        end
        if (n == 16) begin
          dc = (ta && la) ? (st + sl + 16) >> 5 : la ? (sl + 8) >> 4 : ta ? (st + 8) >> 4 : 128;
        end else if ((bx == 0 && by == 0) || (bx > 0 && by > 0)) begin
          dc = (ta && la) ? (st + sl + 4) >> 3 : la ? (sl + 2) >> 2 : ta ? (st + 2) >> 2 : 128;
        end else if (bx > 0) begin
          dc = ta ? (st + 2) >> 2 : la ? (sl + 2) >> 2 : 128;
        end else begin
          dc = la ? (sl + 2) >> 2 : ta ? (st + 2) >> 2 : 128;
        end
        for (int y = by; y < by + m; y++)
          for (int x = bx; x < bx + m; x++)
            if (mode == 2) setpix(pl, x0 + x, y0 + y, dc);
      end
    if (mode == 0) for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) setpix(pl, x0 + x, y0 + y, pix(pl, x0 + x, y0 - 1));
    if (mode == 1) for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) setpix(pl, x0 + x, y0 + y, pix(pl, x0 - 1, y0 + y));
    if (mode == 3) begin
      int h2 = n / 2;
      hh = 0; vv = 0;
      for (int i = 0; i < h2; i++) begin
        hh += (i + 1) * (pix(pl, x0 + h2 + i, y0 - 1) - pix(pl, x0 + h2 - 2 - i, y0 - 1));
        vv += (i + 1) * (pix(pl, x0 - 1, y0 + h2 + i) - pix(pl, x0 - 1, y0 + h2 - 2 - i));
      end
      a = 16 * (pix(pl, x0 - 1, y0 + n - 1) + pix(pl, x0 + n - 1, y0 - 1));
      b = (n == 16) ? (5 * hh + 32) >>> 6 : (34 * hh + 32) >>> 6;
      c = (n == 16) ? (5 * vv + 32) >>> 6 : (34 * vv + 32) >>> 6;
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++)
          setpix(pl, x0 + x, y0 + y, clip1((a + b * (x - h2 + 1) + c * (y - h2 + 1) + 16) >>> 5));
    end
  endtask

  // 4x4 luma block: 0 V, 1 H, 2 DC
  task automatic pred_4x4(input int x0, input int y0, input int mode);
    bit ta = y0 > 0, la = x0 > 0;
    int st = 0, sl = 0, dc;
    for (int i = 0; i < 4; i++) begin
      if (ta) st += pix(0, x0 + i, y0 - 1);
      if (la) sl += pix(0, x0 - 1, y0 + i);
    end
    dc = (ta && la) ? (st + sl + 4) >> 3 : la ? (sl + 2) >> 2 : ta ? (st + 2) >> 2 : 128;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        setpix(0, x0 + x, y0 + y, mode == 0 ? pix(0, x0 + x, y0 - 1) : mode == 1 ? pix(0, x0 - 1, y0 + y) : dc);
  endtask

  // ---------------- one picture ----------------
  task automatic gen_picture(input int ref_idc, input bit idr, input int frame_num, input int pcm_pct);
    int qp, sqp, typ, nc, na, nb, cm, lm, pm, m, rem;
    bit ta, la;
    int bw = mbw * 4;
    mb_kind = new[mbw * mbh]; mb_qp = new[mbw * mbh];
    i4_mode = new[mbw * mbh * 16];
    ry = new[mbw * mbh * 256]; rcb = new[mbw * mbh * 64]; rcr = new[mbw * mbh * 64];
    // an access unit delimiter and an SEI unit, both to be skipped
    put_bits(3'b000, 3); trailing(); emit_nal(0, 9, 1'b1);
    put_bits(8'h05, 8); put_bits(8'h01, 8); put_bits(8'h00, 8); trailing(); emit_nal(0, 6, 1'b0);
    // slice header
    sqp = 20 + $urandom_range(0, 24);
    dbk_idc = $urandom_range(0, 3) == 0 ? 1 : $urandom_range(0, 1) * 2;
    a_off2 = 2 * ($urandom_range(0, 12) - 6); b_off2 = 2 * ($urandom_range(0, 12) - 6);
    put_ue(0); put_ue(7); put_ue(0); put_bits(frame_num, 4);
    if (idr) put_ue(frame_num);
    if (ref_idc != 0) begin
      if (idr) put_bits(0, 2); else put_bits(0, 1);
    end
    put_se(sqp - 26);
    put_ue(dbk_idc);
    if (dbk_idc != 1) begin put_se(a_off2 / 2); put_se(b_off2 / 2); end
    qp = sqp;
    for (int my = 0; my < mbh; my++)
      for (int mx = 0; mx < mbw; mx++) begin
        int mb = my * mbw + mx;
        ta = my > 0; la = mx > 0;
        typ = ($urandom_range(0, 99) < pcm_pct) ? 2 : $urandom_range(0, 1);
        mb_kind[mb] = typ;
        if (typ == 2) begin
          n_pcm++;
          put_ue(25);
          while (rbsp.size() % 8 != 0) rbsp.push_back(1'b0);
          for (int pl = 0; pl < 3; pl++) begin
            int n = pl == 0 ? 16 : 8;
            for (int y = 0; y < n; y++)
              for (int x = 0; x < n; x++) begin
                int v = $urandom_range(0, 3) == 0 ? 0 : $urandom_range(0, 255);
                setpix(pl, mx * n + x, my * n + y, v);
                put_bits(v, 8);
              end
          end
          mb_qp[mb] = 0;
        end else begin
          // chroma mode: 0 DC, 1 H, 2 V, 3 plane
          do cm = $urandom_range(0, 3);
          while ((cm == 1 && !la) || (cm == 2 && !ta) || (cm == 3 && !(la && ta)));
          n_c_mode[cm]++;
          if (typ == 1) begin
            int dq = $urandom_range(0, 6) - 3;
            n_i16++;
            do lm = $urandom_range(0, 3);
            while ((lm == 0 && !ta) || (lm == 1 && !la) || (lm == 3 && !(la && ta)));
            n_i16_mode[lm]++;
            put_ue(1 + lm);
            put_ue(cm);
            put_se(dq);
            qp = (qp + dq + 52) % 52;
            // Intra16x16DCLevel: coeff_token with TotalCoeff 0
            na = la ? (mb_kind[mb-1] == 2 ? 16 : 0) : 0;
            nb = ta ? (mb_kind[mb-mbw] == 2 ? 16 : 0) : 0;
            nc = (la && ta) ? (na + nb + 1) >> 1 : la ? na : nb;
            if (nc < 2) put_bits(1, 1);
            else if (nc < 4) put_bits(3, 2);
            else if (nc < 8) put_bits(15, 4);
            else put_bits(3, 6);
            pred_block(0, mx * 16, my * 16, 16, lm);
            for (int b = 0; b < 16; b++) i4_mode[(my * 4 + b / 4) * bw + mx * 4 + b % 4] = -1;
          end else begin
            n_i4++;
            put_ue(0);
            for (int b = 0; b < 16; b++) begin
              // z-scan order of the sixteen 4x4 blocks
              int bx = ((b >> 2) & 1) * 2 + (b & 1), by = ((b >> 3) & 1) * 2 + ((b >> 1) & 1);
              int gx = mx * 4 + bx, gy = my * 4 + by;
              int ma, mbm;
              bit a_av = gx > 0, b_av = gy > 0;
              ma  = a_av ? i4_mode[gy * bw + gx - 1] : -2;
              mbm = b_av ? i4_mode[(gy - 1) * bw + gx] : -2;
              if (!a_av || !b_av) pm = 2;
              else pm = ((ma < 0) ? 2 : ma) < ((mbm < 0) ? 2 : mbm) ? ((ma < 0) ? 2 : ma) : ((mbm < 0) ? 2 : mbm);
              do m = $urandom_range(0, 2);
              while ((m == 0 && !b_av) || (m == 1 && !a_av));
              n_i4_mode[m]++;
              if (m == pm) put_bits(1, 1);
              else begin
                rem = (m < pm) ? m : m - 1;
                put_bits(0, 1); put_bits(rem, 3);
              end
              i4_mode[gy * bw + gx] = m;
              pred_4x4(gx * 4, gy * 4, m);
            end
            put_ue(cm);
            put_ue(3);                     // coded_block_pattern 0
          end
          mb_qp[mb] = qp;
          pred_block(1, mx * 8, my * 8, 8, cm == 0 ? 2 : cm == 1 ? 1 : cm == 2 ? 0 : 3);
          pred_block(2, mx * 8, my * 8, 8, cm == 0 ? 2 : cm == 1 ? 1 : cm == 2 ? 0 : 3);
        end
      end
    trailing();
    emit_nal(ref_idc, idr ? 5 : 1, $urandom_range(0, 1));
    if (dbk_idc != 1) deblock_picture();
  endtask

  task automatic gen_headers();
    put_bits(66, 8); put_bits(0, 8); put_bits(30, 8);
    put_ue(0); put_ue(0); put_ue(2); put_ue(3); put_bits(0, 1);
    put_ue(mbw - 1); put_ue(mbh - 1); put_bits(1, 1); put_bits(1, 1); put_bits(0, 1); put_bits(0, 1);
    trailing(); emit_nal(3, 7, 1'b1);
    chroma_off = $urandom_range(0, 8) - 4;
    put_ue(0); put_ue(0); put_bits(0, 1); put_bits(0, 1); put_ue(0); put_ue(0); put_ue(0);
    put_bits(0, 1); put_bits(0, 2); put_se(0); put_se(0); put_se(chroma_off);
    put_bits(1, 1); put_bits(0, 1); put_bits(0, 1);
    trailing(); emit_nal(3, 8, 1'b1);
  endtask

  // ---------------- deblocking model ----------------
  int n_dbk_lines;     // lines whose samples the model changed
  localparam int ALPHA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                                32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  localparam int BETA [52]  = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                                9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  localparam int TC0 [52][3] = '{'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
    '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,1},
    '{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},'{1,1,1},'{1,1,1},'{1,1,1},'{1,1,2},
    '{1,1,2},'{1,1,2},'{1,1,2},'{1,2,3},'{1,2,3},'{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},
    '{3,4,6},'{3,4,6},'{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},'{6,8,13},'{7,10,14},
    '{8,11,16},'{9,12,18},'{10,13,20},'{11,15,23},'{13,17,25}};
  localparam int CQP [52] = '{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15,16,17,18,19,20,21,22,23,24,25,26,27,28,29,
                              29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};

  function automatic int cqp(input int q);
    int i = q + chroma_off;
    i = i < 0 ? 0 : i > 51 ? 51 : i;
    return CQP[i];
  endfunction
  function automatic int clip3(input int lo, input int hi, input int v);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  // filter one line across an edge; (x,y) is q0, (dx,dy) points from p to q
  task automatic filter_line(input int pl, input int x, input int y, input int dx, input int dy,
                             input int bs, input int qpav);
    int p [4], q [4], np [3], nq [3], ia, ib, al, be, ap, aq, tc0, tc, d;
    bit ch = pl != 0;
    for (int k = 0; k < 4; k++) begin
      if (!ch || k < 2) begin
        p[k] = pix(pl, x - (k + 1) * dx, y - (k + 1) * dy);
        q[k] = pix(pl, x + k * dx, y + k * dy);
      end else begin p[k] = 0; q[k] = 0; end
    end
    ia = clip3(0, 51, qpav + a_off2); ib = clip3(0, 51, qpav + b_off2);
    al = ALPHA[ia]; be = BETA[ib];
    if (!((p[0] - q[0]) * (p[0] - q[0]) < al * al && (p[1] - p[0]) * (p[1] - p[0]) < be * be &&
          (q[1] - q[0]) * (q[1] - q[0]) < be * be)) return;
    for (int k = 0; k < 3; k++) begin np[k] = p[k]; nq[k] = q[k]; end
    ap = ch ? 0 : (p[2] > p[0] ? p[2] - p[0] : p[0] - p[2]);
    aq = ch ? 0 : (q[2] > q[0] ? q[2] - q[0] : q[0] - q[2]);
    if (bs < 4) begin
      tc0 = TC0[ia][bs - 1];
      tc = ch ? tc0 + 1 : tc0 + (ap < be) + (aq < be);
      d = clip3(-tc, tc, (((q[0] - p[0]) * 4) + (p[1] - q[1]) + 4) >>> 3);
      np[0] = clip1(p[0] + d); nq[0] = clip1(q[0] - d);
      if (!ch && ap < be) np[1] = p[1] + clip3(-tc0, tc0, (p[2] + ((p[0] + q[0] + 1) >> 1) - 2 * p[1]) >>> 1);
      if (!ch && aq < be) nq[1] = q[1] + clip3(-tc0, tc0, (q[2] + ((p[0] + q[0] + 1) >> 1) - 2 * q[1]) >>> 1);
    end else begin
      int ad = p[0] > q[0] ? p[0] - q[0] : q[0] - p[0];
      if (!ch && ap < be && ad < ((al >> 2) + 2)) begin
        np[0] = (p[2] + 2 * p[1] + 2 * p[0] + 2 * q[0] + q[1] + 4) >> 3;
        np[1] = (p[2] + p[1] + p[0] + q[0] + 2) >> 2;
        np[2] = (2 * p[3] + 3 * p[2] + p[1] + p[0] + q[0] + 4) >> 3;
      end else np[0] = (2 * p[1] + p[0] + q[1] + 2) >> 2;
      if (!ch && aq < be && ad < ((al >> 2) + 2)) begin
        nq[0] = (p[1] + 2 * p[0] + 2 * q[0] + 2 * q[1] + q[2] + 4) >> 3;
        nq[1] = (p[0] + q[0] + q[1] + q[2] + 2) >> 2;
        nq[2] = (2 * q[3] + 3 * q[2] + q[1] + q[0] + p[0] + 4) >> 3;
      end else nq[0] = (2 * q[1] + q[0] + p[1] + 2) >> 2;
    end
    for (int k = 0; k < 3; k++) begin
      if (np[k] != p[k] || nq[k] != q[k]) n_dbk_lines += (k == 0);
      setpix(pl, x - (k + 1) * dx, y - (k + 1) * dy, np[k]);
      setpix(pl, x + k * dx, y + k * dy, nq[k]);
    end
  endtask

  task automatic deblock_picture();
    for (int my = 0; my < mbh; my++)
      for (int mx = 0; mx < mbw; mx++) begin
        int mb = my * mbw + mx;
        for (int pl = 0; pl < 3; pl++) begin
          int n = pl == 0 ? 16 : 8;
          for (int dir = 0; dir < 2; dir++)        // vertical edges, then horizontal
            for (int e = 0; e < n; e += 4) begin
              int nb, qp_p, qp_q, bs;
              if (e == 0 && ((dir == 0 && mx == 0) || (dir == 1 && my == 0))) continue;
              nb = (e != 0) ? mb : (dir == 0) ? mb - 1 : mb - mbw;
              qp_p = mb_qp[nb]; qp_q = mb_qp[mb];
              if (pl != 0) begin qp_p = cqp(qp_p); qp_q = cqp(qp_q); end
              bs = (e == 0) ? 4 : 3;
              for (int l = 0; l < n; l++)
                if (dir == 0) filter_line(pl, mx * n + e, my * n + l, 1, 0, bs, (qp_p + qp_q + 1) >> 1);
                else          filter_line(pl, mx * n + l, my * n + e, 0, 1, bs, (qp_p + qp_q + 1) >> 1);
            end
        end
      end
  endtask

  // expected output words of the current reference picture, in output order
  logic [31:0] exp_words [$];
  task automatic expected_words();
    exp_words.delete();
    for (int pl = 0; pl < 3; pl++) begin
      int w = pl == 0 ? mbw * 16 : mbw * 8, h = pl == 0 ? mbh * 16 : mbh * 8;
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x += 4)
          exp_words.push_back({8'(pix(pl, x + 3, y)), 8'(pix(pl, x + 2, y)), 8'(pix(pl, x + 1, y)), 8'(pix(pl, x, y))});
    end
  endtask
