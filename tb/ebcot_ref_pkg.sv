// ebcot_ref_pkg: sequential reference model of code-block coding for the
// testbenches. It codes a code-block plane after plane and pass after pass, in
// the textbook order (SP, then MR, then CU over the whole plane), and feeds each
// pass to its own freshly initialised MQ encoder written in the classic
// byte-pointer form. Its output is what the parallel coder must reproduce.
package ebcot_ref_pkg;

  typedef byte unsigned bytes_q[$];

  class mq_ref;
    int unsigned a, c, ct, bp;
    byte unsigned buf_[$];
    int idx[19];
    int mps[19];
    int log_[$];          // coded decisions, cx*2 + d
    static int QE[47]   = '{'h5601,'h3401,'h1801,'h0AC1,'h0521,'h0221,'h5601,'h5401,'h4801,'h3801,
                            'h3001,'h2401,'h1C01,'h1601,'h5601,'h5401,'h5101,'h4801,'h3801,'h3401,
                            'h3001,'h2801,'h2401,'h2201,'h1C01,'h1801,'h1601,'h1401,'h1201,'h1101,
                            'h0AC1,'h09C1,'h08A1,'h0521,'h0441,'h02A1,'h0221,'h0141,'h0111,'h0085,
                            'h0049,'h0025,'h0015,'h0009,'h0005,'h0001,'h5601};
    static int NMPS[47] = '{1,2,3,4,5,38,7,8,9,10,11,12,13,29,15,16,17,18,19,20,21,22,23,24,25,26,27,28,29,30,
                            31,32,33,34,35,36,37,38,39,40,41,42,43,44,45,45,46};
    static int NLPS[47] = '{1,6,9,12,29,33,6,14,14,14,17,18,20,21,14,14,15,16,17,18,19,19,20,21,22,23,24,25,26,27,
                            28,29,30,31,32,33,34,35,36,37,38,39,40,41,42,43,46};
    static int SWT[47]  = '{1,0,0,0,0,0,1,0,0,0,0,0,0,0,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
                            0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0};

    function new();
      a = 'h8000; c = 0; ct = 12;
      buf_.delete(); buf_.push_back(0);   // position 0 stands for the byte before the stream
      bp = 0;
      foreach (idx[i]) begin idx[i] = 0; mps[i] = 0; end
      idx[0] = 4; idx[17] = 3; idx[18] = 46;
    endfunction

    function void byteout();
      if (buf_[bp] == 8'hFF) begin
        bp++; buf_.push_back(8'((c >> 20) & 'hFF)); c &= 'hFFFFF; ct = 7;
      end else if (c < 'h8000000) begin
        bp++; buf_.push_back(8'((c >> 19) & 'hFF)); c &= 'h7FFFF; ct = 8;
      end else begin
        buf_[bp] = buf_[bp] + 1;
        if (buf_[bp] == 8'hFF) begin
          c &= 'h7FFFFFF;
          bp++; buf_.push_back(8'((c >> 20) & 'hFF)); c &= 'hFFFFF; ct = 7;
        end else begin
          bp++; buf_.push_back(8'((c >> 19) & 'hFF)); c &= 'h7FFFF; ct = 8;
        end
      end
    endfunction

    function void renorm();
      do begin
        a = (a << 1) & 'hFFFF; c = (c << 1) & 'hFFFFFFF; ct--;
        if (ct == 0) byteout();
      end while ((a & 'h8000) == 0);
    endfunction

    function void encode(int cx, int d);
      int i; int q;
      log_.push_back(cx * 2 + d);
      i = idx[cx]; q = QE[i];
      a = a - q;
      if (d == mps[cx]) begin
        if ((a & 'h8000) == 0) begin
          if (a < q) a = q; else c = c + q;
          idx[cx] = NMPS[i];
          renorm();
        end else c = c + q;
      end else begin
        if (a < q) c = c + q; else a = q;
        if (SWT[i]) mps[cx] = 1 - mps[cx];
        idx[cx] = NLPS[i];
        renorm();
      end
    endfunction

    function bytes_q flush();
      int unsigned t;
      bytes_q r;
      t = c + a;
      c = c | 'hFFFF;
      if (c >= t) c = c - 'h8000;
      c = (c << ct) & 'hFFFFFFF; byteout();
      c = (c << ct) & 'hFFFFFFF; byteout();
      // bytes 1..bp form the stream; the last one is kept unless it is 0xFF
      for (int k = 1; k <= bp; k++) r.push_back(buf_[k]);
      if (r.size() > 0 && r[r.size()-1] == 8'hFF) void'(r.pop_back());
      return r;
    endfunction
  endclass

  // band: 0 LL, 1 HL, 2 LH, 3 HH
  function automatic int zc(int band, int h, int v, int d);
    int t;
    if (band == 1) begin t = h; h = v; v = t; end
    if (band == 3) begin
      if (d >= 3) return 8;
      if (d == 2) return (h + v >= 1) ? 7 : 6;
      if (d == 1) return (h + v >= 2) ? 5 : (h + v == 1) ? 4 : 3;
      return (h + v >= 2) ? 2 : (h + v == 1) ? 1 : 0;
    end
    if (h == 2) return 8;
    if (h == 1) return (v >= 1) ? 7 : (d >= 1) ? 6 : 5;
    if (v == 2) return 4;
    if (v == 1) return 3;
    return (d >= 2) ? 2 : (d == 1) ? 1 : 0;
  endfunction

  class cb_ref;
    int W, H, NPL, band, vc;
    int mag[][];
    int neg[][];
    int sig[][];
    int refd[][];
    int vis[][];
    int sig_before[][];
    mq_ref coder;
    bytes_q out[][];     // [plane][pass]
    int     cxd_log[][][$];  // [plane][pass] decisions, cx*2 + d
    int     st_after[][][];  // [plane][y][x] 2-bit state after the plane's CU pass

    function new(int w, int h, int npl, int b, int vcausal);
      W = w; H = h; NPL = npl; band = b; vc = vcausal;
      mag = new[H]; neg = new[H]; sig = new[H]; refd = new[H]; vis = new[H]; sig_before = new[H];
      foreach (mag[y]) begin
        mag[y] = new[W]; neg[y] = new[W]; sig[y] = new[W]; refd[y] = new[W];
        vis[y] = new[W]; sig_before[y] = new[W];
      end
      out = new[NPL];
      foreach (out[p]) out[p] = new[3];
      cxd_log = new[NPL];
      foreach (cxd_log[p]) cxd_log[p] = new[3];
      st_after = new[NPL];
      foreach (st_after[p]) begin
        st_after[p] = new[H];
        foreach (st_after[p][y]) st_after[p][y] = new[W];
      end
    endfunction

    function int s_at(int y, int x, int yc);
      if (y < 0 || y >= H || x < 0 || x >= W) return 0;
      // vertically causal: rows of the next stripe are not looked at
      if (vc && (y / 4) > (yc / 4)) return 0;
      return sig[y][x];
    endfunction

    function int nsum(int y, int x);
      int n = 0;
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++)
          if (dy != 0 || dx != 0) n += s_at(y + dy, x + dx, y);
      return n;
    endfunction

    function int zc_at(int y, int x);
      int h, v, d;
      h = s_at(y, x-1, y) + s_at(y, x+1, y);
      v = s_at(y-1, x, y) + s_at(y+1, x, y);
      d = s_at(y-1, x-1, y) + s_at(y-1, x+1, y) + s_at(y+1, x-1, y) + s_at(y+1, x+1, y);
      return zc(band, h, v, d);
    endfunction

    function int contrib(int y, int x, int yc);
      if (!s_at(y, x, yc)) return 0;
      return neg[y][x] ? -1 : 1;
    endfunction

    function void code_sign(int y, int x);
      int hc, vcn, cx, xr;
      hc  = contrib(y, x-1, y) + contrib(y, x+1, y);
      vcn = contrib(y-1, x, y) + contrib(y+1, x, y);
      if (hc > 1) hc = 1; if (hc < -1) hc = -1;
      if (vcn > 1) vcn = 1; if (vcn < -1) vcn = -1;
      if (hc == 0 && vcn == 0) begin cx = 9; xr = 0; end
      else if (hc == 0) begin cx = 10; xr = (vcn < 0); end
      else begin
        xr = (hc < 0);
        if (hc * vcn > 0) cx = 13; else if (vcn == 0) cx = 12; else cx = 11;
      end
      coder.encode(cx, neg[y][x] ^ xr);
    endfunction

    function void run();
      foreach (sig[y, x]) begin sig[y][x] = 0; refd[y][x] = 0; end
      for (int p = NPL - 1; p >= 0; p--) begin
        foreach (sig[y, x]) begin vis[y][x] = 0; sig_before[y][x] = sig[y][x]; end
        // significance propagation
        coder = new();
        for (int s = 0; s < H; s += 4)
          for (int x = 0; x < W; x++)
            for (int y = s; y < s + 4; y++)
              if (!sig[y][x] && nsum(y, x) > 0) begin
                int b = (mag[y][x] >> p) & 1;
                coder.encode(zc_at(y, x), b);
                vis[y][x] = 1;
                if (b) begin code_sign(y, x); sig[y][x] = 1; end
              end
        out[p][0] = coder.flush(); cxd_log[p][0] = coder.log_;
        // magnitude refinement
        coder = new();
        for (int s = 0; s < H; s += 4)
          for (int x = 0; x < W; x++)
            for (int y = s; y < s + 4; y++)
              if (sig_before[y][x]) begin
                int cx = refd[y][x] ? 16 : (nsum(y, x) > 0 ? 15 : 14);
                coder.encode(cx, (mag[y][x] >> p) & 1);
                refd[y][x] = 1;
              end
        out[p][1] = coder.flush(); cxd_log[p][1] = coder.log_;
        // cleanup
        coder = new();
        for (int s = 0; s < H; s += 4)
          for (int x = 0; x < W; x++) begin
            int y0 = s;
            int rl = 1;
            for (int y = s; y < s + 4; y++)
              if (sig[y][x] || vis[y][x] || nsum(y, x) > 0) rl = 0;
            if (rl) begin
              int q = 4;
              for (int y = s + 3; y >= s; y--) if ((mag[y][x] >> p) & 1) q = y - s;
              if (q == 4) begin coder.encode(17, 0); y0 = s + 4; end
              else begin
                coder.encode(17, 1);
                coder.encode(18, (q >> 1) & 1);
                coder.encode(18, q & 1);
                code_sign(s + q, x);
                sig[s + q][x] = 1;
                y0 = s + q + 1;
              end
            end
            for (int y = y0; y < s + 4; y++)
              if (!sig[y][x] && !vis[y][x]) begin
                int b = (mag[y][x] >> p) & 1;
                coder.encode(zc_at(y, x), b);
                if (b) begin code_sign(y, x); sig[y][x] = 1; end
              end
          end
        out[p][2] = coder.flush(); cxd_log[p][2] = coder.log_;
        foreach (sig[y, x]) st_after[p][y][x] = !sig[y][x] ? 0 : refd[y][x] ? 3 : 2;
      end
    endfunction
  endclass
endpackage
