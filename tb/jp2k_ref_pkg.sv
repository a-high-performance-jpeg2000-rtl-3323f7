// jp2k_ref_pkg: reference models used by the testbenches.
//
// Plain procedural models of the JPEG2000 encoder steps, written directly
// from the algorithm definitions and independent of the RTL structure:
//  * dwt_forward / dwt_inverse: 2-D lifting DWT on an N x N integer array,
//    column-row order, in place, symmetric extension. (5,3) uses the
//    integer lifting of JPEG2000 Part 1 (floor((a+b)/2), floor((a+b+2)/4));
//    (9,7) uses 8-bit fraction coefficients with products rounded half up.
//  * ebcot_encode: the EBCOT bit-plane coder (vertically causal mode,
//    optional bypass) producing the list of context/data pairs.
//  * mq_encode: the MQ arithmetic coder with the raw/bypass and end-of-block
//    conventions of this design, producing the code bytes.
package jp2k_ref_pkg;
  import jp2k_pkg::*;

  typedef int int_q[$];
  typedef byte unsigned byte_q[$];

  // ------------------------------------------------------------------ DWT
  function automatic int wrap16(int v);
    return int'(shortint'(v));
  endfunction

  // one lifting step on a 1-D line; kind: 0 = (5,3) predict, 1 = (5,3)
  // update, 2 = multiply by coef; inv subtracts instead of adding
  function automatic void lift_line(ref int x[$], input int m, input int parity,
                                    input int kind, input int coef, input bit inv);
    for (int i = parity; i < m; i += 2) begin
      int l, r, s, p;
      l = (i - 1 >= 0) ? x[i-1] : x[i+1];
      r = (i + 1 < m) ? x[i+1] : x[i-1];
      s = wrap16(l + r);
      case (kind)
        0: p = -(s >>> 1);
        1: p = (s + 2) >>> 2;
        default: p = wrap16((coef * s + 128) >>> 8);
      endcase
      x[i] = wrap16(inv ? x[i] - p : x[i] + p);
    end
  endfunction

  function automatic void dwt_steps(input bit is97, output int kinds[$], output int pars[$],
                                    output int coefs[$]);
    kinds = {}; pars = {}; coefs = {};
    if (!is97) begin
      kinds = {0, 1}; pars = {1, 0}; coefs = {0, 0};
    end else begin
      kinds = {2, 2, 2, 2}; pars = {1, 0, 1, 0};
      coefs = {int'(C97_ALPHA), int'(C97_BETA), int'(C97_GAMMA), int'(C97_DELTA)};
    end
  endfunction

  // apply the lifting steps to every column (rowpass=0) or row of a band
  function automatic void dwt_pass(ref int img[], input int n, input int lvl, input bit rowpass,
                                   input bit is97, input bit inv);
    int m, s;
    int kinds[$], pars[$], coefs[$];
    m = n >> lvl;
    s = 1 << lvl;
    dwt_steps(is97, kinds, pars, coefs);
    for (int j = 0; j < m; j++) begin
      int line[$];
      line = {};
      for (int i = 0; i < m; i++)
        line.push_back(rowpass ? img[(j*s)*n + i*s] : img[(i*s)*n + j*s]);
      if (!inv)
        for (int k = 0; k < kinds.size(); k++) lift_line(line, m, pars[k], kinds[k], coefs[k], 1'b0);
      else
        for (int k = kinds.size() - 1; k >= 0; k--) lift_line(line, m, pars[k], kinds[k], coefs[k], 1'b1);
      for (int i = 0; i < m; i++)
        if (rowpass) img[(j*s)*n + i*s] = line[i];
        else         img[(i*s)*n + j*s] = line[i];
    end
  endfunction

  function automatic void dwt_scale(ref int img[], input int n, input int lvl, input bit inv);
    int m, s;
    m = n >> lvl;
    s = 1 << lvl;
    for (int r = 0; r < m; r++)
      for (int c = (r % 2); c < m; c += 2) begin
        int k;
        k = ((r % 2) == 1) != inv ? int'(C97_K2) : int'(C97_INVK2);
        img[(r*s)*n + c*s] = wrap16((k * img[(r*s)*n + c*s] + 128) >>> 8);
      end
  endfunction

  function automatic void dwt_forward(ref int img[], input int n, input int levels, input bit is97);
    for (int l = 0; l < levels; l++) begin
      dwt_pass(img, n, l, 1'b0, is97, 1'b0);
      dwt_pass(img, n, l, 1'b1, is97, 1'b0);
      if (is97) dwt_scale(img, n, l, 1'b0);
    end
  endfunction

  function automatic void dwt_inverse(ref int img[], input int n, input int levels, input bit is97);
    for (int l = levels - 1; l >= 0; l--) begin
      if (is97) dwt_scale(img, n, l, 1'b1);
      dwt_pass(img, n, l, 1'b1, is97, 1'b1);
      dwt_pass(img, n, l, 1'b0, is97, 1'b1);
    end
  endfunction

  // ------------------------------------------------------------------ MQ
  // MQ encoder of JPEG2000 Part 1 (Annex C) over a list of pairs, with this
  // design's CX_RAW (bypass bit) and CX_END (end of block) conventions.
  function automatic byte_q mq_encode(input cxd_t pairs[$]);
    byte_q out;
    int idx[NCTX];
    bit mpsv[NCTX];
    int a, c, ct, b;
    bit first, dirty, raw;
    int racc, rcnt, rlim;
    out = {};
    for (int k = 0; k < NCTX; k++) begin idx[k] = int'(mq_init_idx(5'(k))); mpsv[k] = 0; end
    a = 'h8000; c = 0; ct = 12; b = 0; first = 1; dirty = 0; raw = 0;
    racc = 0; rcnt = 0; rlim = 8;
    foreach (pairs[p]) begin
      int cx;
      bit d;
      cx = int'(pairs[p].cx);
      d  = pairs[p].d;
      if (cx == int'(CX_END) || (cx == int'(CX_RAW) && !raw)) begin
        if (raw) begin
          if (rcnt > 0) out.push_back(8'((racc << (rlim - rcnt)) & ((1 << rlim) - 1)));
          raw = 0; rcnt = 0; rlim = 8; racc = 0;
        end else if (dirty) begin
          // FLUSH: SETBITS, two byte outputs, last byte unless 0xFF
          int tempc;
          tempc = c + a;
          c = c | 'hFFFF;
          if (c >= tempc) c = c - 'h8000;
          c = c << ct; mq_byteout(out, b, c, ct, first);
          c = c << ct; mq_byteout(out, b, c, ct, first);
          if (b != 'hFF) out.push_back(8'(b));
          dirty = 0;
        end
        if (cx == int'(CX_END)) break;
      end
      if (cx == int'(CX_RAW)) begin
        raw = 1;
        racc = (racc << 1) | int'(d);
        rcnt++;
        if (rcnt == rlim) begin
          int v;
          v = racc & ((1 << rlim) - 1);
          out.push_back(8'(v));
          rlim = (v == 'hFF) ? 7 : 8;
          rcnt = 0; racc = 0;
        end
        continue;
      end
      if (raw) begin
        if (rcnt > 0) out.push_back(8'((racc << (rlim - rcnt)) & ((1 << rlim) - 1)));
        raw = 0; rcnt = 0; rlim = 8; racc = 0;
        a = 'h8000; c = 0; ct = 12; b = 0; first = 1;
      end
      if (!dirty) begin a = 'h8000; c = 0; ct = 12; b = 0; first = 1; end
      dirty = 1;
      begin
        int qe, i0;
        bit renorm;
        i0 = idx[cx];
        qe = int'(mq_qe(6'(i0)));
        a = a - qe;
        renorm = 1;
        if (d == mpsv[cx]) begin
          if ((a & 'h8000) != 0) begin c = c + qe; renorm = 0; end
          else begin
            if (a < qe) a = qe; else c = c + qe;
            idx[cx] = int'(mq_nmps(6'(i0)));
          end
        end else begin
          if (a < qe) c = c + qe; else a = qe;
          if (mq_switch(6'(i0))) mpsv[cx] = !mpsv[cx];
          idx[cx] = int'(mq_nlps(6'(i0)));
        end
        if (renorm)
          do begin
            a = (a << 1) & 'hFFFF;
            c = c << 1;
            ct--;
            if (ct == 0) mq_byteout(out, b, c, ct, first);
          end while ((a & 'h8000) == 0);
      end
    end
    return out;
  endfunction

  function automatic void mq_byteout(ref byte_q out, ref int b, ref int c, ref int ct, ref bit first);
    if (b == 'hFF) begin
      if (!first) out.push_back(8'(b));
      b = (c >> 20) & 'hFF; c = c & 'hFFFFF; ct = 7;
    end else if (c < 'h8000000) begin
      if (!first) out.push_back(8'(b));
      b = (c >> 19) & 'hFF; c = c & 'h7FFFF; ct = 8;
    end else begin
      b = b + 1;
      if (b == 'hFF) begin
        c = c & 'h7FFFFFF;
        if (!first) out.push_back(8'(b));
        b = (c >> 20) & 'hFF; c = c & 'hFFFFF; ct = 7;
      end else begin
        if (!first) out.push_back(8'(b));
        b = (c >> 19) & 'hFF; c = c & 'h7FFFF; ct = 8;
      end
    end
    first = 0;
  endfunction

  // ------------------------------------------------------------------ EBCOT
  // Bit-plane coder over an h x w block of sign-magnitude samples (mag, neg
  // indexed [row*w + col]), vertically causal, with optional bypass.
  function automatic cxd_t cx(int c, bit d);
    cxd_t p;
    p.cx = 5'(c);
    p.d  = d;
    return p;
  endfunction

  function automatic bit in_sig(ref bit sg[], input int r, int c, int h, int w, int r0, bit vc);
    if (r < 0 || c < 0 || r >= h || c >= w) return 0;
    if (vc && r > r0) return 0;   // below the strip
    return sg[r*w + c];
  endfunction

  function automatic void ebcot_ctx(ref bit sg[], ref bit ng[], input int r, int c, int h, int w,
                                    input int band, output int zc, output int scx, output bit sxor,
                                    output bit any);
    int hh, vv, dd, hc, vc2;
    int stop;      // last row of the strip
    bit h0, h1, v0, v1;
    stop = (r / 4) * 4 + 3;
    h0 = in_sig(sg, r, c - 1, h, w, stop, 1);
    h1 = in_sig(sg, r, c + 1, h, w, stop, 1);
    v0 = in_sig(sg, r - 1, c, h, w, stop, 1);
    v1 = in_sig(sg, r + 1, c, h, w, stop, 1);
    hh = int'(h0) + int'(h1);
    vv = int'(v0) + int'(v1);
    dd = int'(in_sig(sg, r - 1, c - 1, h, w, stop, 1)) + int'(in_sig(sg, r - 1, c + 1, h, w, stop, 1))
       + int'(in_sig(sg, r + 1, c - 1, h, w, stop, 1)) + int'(in_sig(sg, r + 1, c + 1, h, w, stop, 1));
    any = (hh + vv + dd) > 0;
    if (band == 1) begin int t = hh; hh = vv; vv = t; end
    if (band == 3) begin
      if (dd >= 3) zc = 8;
      else if (dd == 2) zc = (hh + vv >= 1) ? 7 : 6;
      else if (dd == 1) zc = (hh + vv >= 2) ? 5 : (hh + vv == 1) ? 4 : 3;
      else zc = (hh + vv >= 2) ? 2 : (hh + vv == 1) ? 1 : 0;
    end else begin
      if (hh == 2) zc = 8;
      else if (hh == 1) zc = (vv >= 1) ? 7 : (dd >= 1) ? 6 : 5;
      else if (vv == 2) zc = 4;
      else if (vv == 1) zc = 3;
      else zc = (dd >= 2) ? 2 : (dd == 1) ? 1 : 0;
    end
    // sign contributions
    hc = 0; vc2 = 0;
    if (h0) hc += ng[r*w + c - 1] ? -1 : 1;
    if (h1) hc += ng[r*w + c + 1] ? -1 : 1;
    if (v0) vc2 += ng[(r-1)*w + c] ? -1 : 1;
    if (v1) vc2 += ng[(r+1)*w + c] ? -1 : 1;
    hc = (hc > 0) ? 1 : (hc < 0) ? -1 : 0;
    vc2 = (vc2 > 0) ? 1 : (vc2 < 0) ? -1 : 0;
    begin
      // rows: H = -1, 0, 1; columns: V = -1, 0, 1
      int tcx[9] = '{13, 12, 11, 10, 9, 10, 11, 12, 13};
      bit tx[9]  = '{1, 1, 1, 1, 0, 0, 0, 0, 0};
      scx  = tcx[(hc + 1) * 3 + (vc2 + 1)];
      sxor = tx[(hc + 1) * 3 + (vc2 + 1)];
    end
  endfunction

  function automatic void code_sign(ref cxd_t q[$], ref bit sg[], ref bit ng[], ref bit chi[],
                                    input int r, int c, int h, int w, int band, bit raw, bit s);
    int zc, scx;
    bit sx, any;
    ebcot_ctx(sg, chi, r, c, h, w, band, zc, scx, sx, any);
    if (raw) q.push_back(cx(int'(CX_RAW), s));
    else     q.push_back(cx(scx, s ^ sx));
    sg[r*w + c] = 1;
    chi[r*w + c] = s;
  endfunction

  function automatic void ebcot_encode(input int mag[], input bit neg[], input int h, input int w,
                                       input int band, input int numbps, input bit bypass,
                                       ref cxd_t q[$]);
    bit sg[], vis[], rf[], chi[];
    q = {};
    sg = new[h*w]; vis = new[h*w]; rf = new[h*w]; chi = new[h*w];
    for (int k = 0; k < numbps; k++) begin
      int p;
      p = numbps - 1 - k;
      for (int pass = (k == 0) ? 2 : 0; pass < 3; pass++) begin
        bit raw;
        raw = bypass && k >= 4 && pass != 2;
        for (int s0 = 0; s0 < h; s0 += 4)
          for (int c = 0; c < w; c++) begin
            int rstart;
            rstart = s0;
            if (pass == 2) begin
              bit ok;
              ok = 1;
              for (int r = s0; r < s0 + 4; r++) begin
                int zc, scx; bit sx, any;
                ebcot_ctx(sg, chi, r, c, h, w, band, zc, scx, sx, any);
                if (sg[r*w + c] || vis[r*w + c] || any) ok = 0;
              end
              if (ok) begin
                int zi;
                zi = -1;
                for (int r = s0 + 3; r >= s0; r--) if (((mag[r*w + c] >> p) & 1) != 0) zi = r - s0;
                q.push_back(cx(17, zi >= 0));
                if (zi < 0) continue;
                q.push_back(cx(18, zi[1]));
                q.push_back(cx(18, zi[0]));
                code_sign(q, sg, neg, chi, s0 + zi, c, h, w, band, 0, neg[(s0 + zi)*w + c]);
                rstart = s0 + zi + 1;
              end
            end
            for (int r = rstart; r < s0 + 4; r++) begin
              int zc, scx; bit sx, any, v;
              int i;
              i = r*w + c;
              v = ((mag[i] >> p) & 1) != 0;
              ebcot_ctx(sg, chi, r, c, h, w, band, zc, scx, sx, any);
              if (pass == 0) begin
                if (!sg[i] && any) begin
                  q.push_back(raw ? cx(int'(CX_RAW), v) : cx(zc, v));
                  vis[i] = 1;
                  if (v) code_sign(q, sg, neg, chi, r, c, h, w, band, raw, neg[i]);
                end
              end else if (pass == 1) begin
                if (sg[i] && !vis[i]) begin
                  int mc;
                  mc = rf[i] ? 16 : any ? 15 : 14;
                  q.push_back(raw ? cx(int'(CX_RAW), v) : cx(mc, v));
                  rf[i] = 1;
                  vis[i] = 1;
                end
              end else begin
                if (!sg[i] && !vis[i]) begin
                  q.push_back(cx(zc, v));
                  if (v) code_sign(q, sg, neg, chi, r, c, h, w, band, 0, neg[i]);
                end
              end
            end
          end
      end
      foreach (vis[i]) vis[i] = 0;
    end
    q.push_back(cx(int'(CX_END), 0));
  endfunction

endpackage
