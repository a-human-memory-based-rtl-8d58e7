// tb_ocr_top: end-to-end test of the recognizer at reduced size (32-row
// frames, 64 columns, 4 references with 2 long-term ranks, N_th=2, and a
// wide reliability margin C=300 so that similar letters such as E and F
// give unreliable matches).
//
// Words of block-letter glyphs (L T O E F C P, drawn 3 or 2 pixels per
// glyph cell, with background texture, isolated dark specks and light holes
// inside strokes) are streamed column by column into the top. A model
// written here follows the same columns through every stage: word-frame
// closing (word space or W_MAX, one blank margin column kept on each
// side), 3x3 median, 5x5 local-mean threshold,
// labeling, segmentation, bilinear 16x16 resize, moment features and the
// learning procedure, and predicts every result: label, bounding box,
// pattern, and the learning outcome (new/known, reliable, forgotten,
// renewed, address, distance, rank). Each mechanism must occur at least
// once: frame closed by a word space and by W_MAX, speck removed by the
// median, new reference into long- and short-term memory, forgetting,
// reliable and unreliable matches, renewal.
module tb_ocr_top;
  import ocr_pkg::*;
  localparam int H = 32, WM = 64, SP = 4, N = 4, S = 2, NTH = 2;
  localparam int JS = 5, JL = 8, JLOW = 1, C = 300, DI = 96, DMIN = 16, DMAX = 384;
  localparam int LW = 8, CW = $clog2(WM + 1), RW = $clog2(H), NW = $clog2(N + 1);

  logic clk = 0, rst_n = 0, pix_valid = 0, pix_ready, res_valid, frame_done;
  logic [7:0] pix = 0;
  learn_result_t res;
  logic [LW-1:0] res_label;
  logic [CW-1:0] res_x0, res_x1;
  logic [RW-1:0] res_y0, res_y1;
  pattern_t res_pat;
  logic [NW-1:0] ref_count;

  ocr_top #(.FRAME_H(H), .W_MAX(WM), .SPACE_COLS(SP), .N_REF(N), .S_POS(S), .NTH(NTH), .C(C)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_space = 0, m_wmax = 0, m_speck = 0, m_new_long = 0, m_new_short = 0, m_evict = 0;
  int m_rel = 0, m_unrel = 0, m_upd = 0, m_known = 0;

  initial begin
    repeat (3000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- stimulus
  typedef int col_t [H];
  col_t stream [$];
  string glyph [7][7] = '{
    '{"10000","10000","10000","10000","10000","10000","11111"},   // L
    '{"11111","00100","00100","00100","00100","00100","00100"},   // T
    '{"11111","10001","10001","10001","10001","10001","11111"},   // O
    '{"11111","10000","10000","11110","10000","10000","11111"},   // E
    '{"11111","10000","10000","11110","10000","10000","10000"},   // F
    '{"11111","10000","10000","10000","10000","10000","11111"},   // C
    '{"11111","10001","10001","11111","10000","10000","10000"}};  // P

  function automatic col_t blank_col();
    col_t c;
    for (int r = 0; r < H; r++) c[r] = 180 + $urandom_range(0, 30);
    return c;
  endfunction

  // Appends one glyph drawn with s x s pixel cells, top at row 4.
  task automatic add_glyph(input int g, input int s, input bit holes);
    for (int gx = 0; gx < 5; gx++)
      for (int sx = 0; sx < s; sx++) begin
        col_t c; c = blank_col();
        for (int gy = 0; gy < 7; gy++)
          if (glyph[g][gy][gx] == "1")
            for (int sy = 0; sy < s; sy++) c[4 + gy*s + sy] = $urandom_range(10, 40);
        if (holes && s == 3 && sx == 1 && glyph[g][3][gx] == "1" && $urandom_range(0, 1)) c[4 + 3*s + 1] = 190;
        stream.push_back(c);
      end
  endtask

  task automatic add_word(input int gl [], input int s, input int specks);
    stream.push_back(blank_col());
    foreach (gl[i]) begin
      add_glyph(gl[i], s, 1);
      if (i != gl.size() - 1) for (int k = 0; k < 2; k++) stream.push_back(blank_col());
    end
    // isolated dark specks in the margin rows of ink columns
    for (int k = 0; k < specks; k++) begin
      int c; c = stream.size() - 1 - 4 * k - 1;
      stream[c][(k % 2) ? 1 : H - 2] = 0;
      m_speck++;
    end
    for (int k = 0; k < SP; k++) stream.push_back(blank_col());
  endtask

  // ------------------------------------------------------------------ model
  typedef struct { int lab; int x0, x1, y0, y1; pattern_t pat; learn_result_t lr; } exp_t;
  exp_t expq [$];

  pattern_t refs [N];
  bit       rvalid [N];
  int dth [N], cnt [N], dsum [N];
  int fsum [N][FEAT_N];
  int pcnt [N][256];
  int rq [$];

  function automatic int mdist(input pattern_t a, input pattern_t b);
    int h, s;
    h = 0; s = 0;
    for (int i = 0; i < 256; i++) h += (a.img[i] != b.img[i]);
    for (int k = 0; k < FEAT_N; k++) s += (int'(a.feat[k]) - int'(b.feat[k])) ** 2;
    return h + 4 * $rtoi($floor($sqrt(real'(s)) + 1e-9));
  endfunction

  function automatic void restart(input int a, input pattern_t p, input int t);
    refs[a] = p; rvalid[a] = 1; dth[a] = t; cnt[a] = 1; dsum[a] = t / 2;
    for (int k = 0; k < FEAT_N; k++) fsum[a][k] = p.feat[k];
    for (int i = 0; i < 256; i++) pcnt[a][i] = p.img[i];
  endfunction

  function automatic learn_result_t learn(input pattern_t p);
    learn_result_t lr;
    int w, l, dw, dl, d, pos, j, addr;
    bit known, rel, ev, upd;
    w = -1; l = -1; dw = 0; dl = 0;
    for (int a = 0; a < N; a++) if (rvalid[a]) begin
      d = mdist(p, refs[a]);
      if (w < 0 || d < dw) begin l = w; dl = dw; w = a; dw = d; end
      else if (l < 0 || d < dl) begin l = a; dl = d; end
    end
    known = (w >= 0) && dw < dth[w];
    rel = known && (l < 0 || dl - dw > C);
    ev = 0; upd = 0;
    if (!known) begin
      if (rq.size() < S) begin addr = rq.size(); rq.push_back(addr); pos = rq.size() - 1; m_new_long++; end
      else begin
        if (rq.size() == N) begin addr = rq.pop_back(); ev = 1; m_evict++; end
        else addr = rq.size();
        rq.insert(S, addr); pos = S; m_new_short++;
      end
      restart(addr, p, DI);
    end else begin
      int old;
      addr = w; m_known++;
      foreach (rq[i]) if (rq[i] == w) old = i;
      j = !rel ? JLOW : (old < S ? JL : JS);
      pos = old - j < 0 ? 0 : old - j;
      rq.delete(old); rq.insert(pos, w);
      if (rel) m_rel++; else m_unrel++;
      cnt[w]++; dsum[w] += dw;
      for (int k = 0; k < FEAT_N; k++) fsum[w][k] += p.feat[k];
      for (int i = 0; i < 256; i++) pcnt[w][i] += p.img[i];
      if (cnt[w] > NTH) begin
        pattern_t m; int t;
        for (int i = 0; i < 256; i++) m.img[i] = 2 * pcnt[w][i] >= cnt[w];
        for (int k = 0; k < FEAT_N; k++) m.feat[k] = 8'(fsum[w][k] / cnt[w]);
        t = 2 * dsum[w] / cnt[w];
        t = t < DMIN ? DMIN : (t > DMAX ? DMAX : t);
        restart(w, m, t);
        upd = 1; m_upd++;
      end
    end
    lr = '0;
    lr.is_new = !known; lr.reliable = rel; lr.evicted = ev; lr.updated = upd;
    lr.addr = 16'(addr); lr.distance = dist_t'(known ? dw : (w >= 0 ? dw : 0)); lr.rank = 16'(pos);
    return lr;
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // Processes one captured frame of W columns.
  task automatic model_frame(input col_t fr [$]);
    int W, nl;
    int med [WM][H], lab [WM][H];
    bit bn [WM][H];
    W = fr.size();
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        int v [9]; int k; k = 0;
        for (int dx = -1; dx <= 1; dx++)
          for (int dy = -1; dy <= 1; dy++) v[k++] = fr[clampi(c+dx, 0, W-1)][clampi(r+dy, 0, H-1)];
        v.sort();
        med[c][r] = v[4];
      end
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        int s; s = 0;
        for (int dx = -2; dx <= 2; dx++)
          for (int dy = -2; dy <= 2; dy++) s += med[clampi(c+dx, 0, W-1)][clampi(r+dy, 0, H-1)];
        bn[c][r] = (med[c][r] + 8) * 25 < s;
      end
    nl = 0;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        int best; best = 0;
        if (bn[c][r]) begin
          int nb [4];
          nb[0] = (r > 0) ? lab[c][r-1] : 0;
          nb[1] = (c > 0 && r > 0) ? lab[c-1][r-1] : 0;
          nb[2] = (c > 0) ? lab[c-1][r] : 0;
          nb[3] = (c > 0 && r < H-1) ? lab[c-1][r+1] : 0;
          foreach (nb[i]) if (nb[i] != 0 && (best == 0 || nb[i] < best)) best = nb[i];
          if (best == 0) begin nl++; best = nl; end
        end
        lab[c][r] = best;
      end
    for (int L = 1; L <= nl; L++) begin
      int n, x0, x1, y0, y1;
      exp_t e;
      n = 0; x0 = 999; x1 = -1; y0 = 999; y1 = -1;
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++)
          if (lab[c][r] == L) begin
            n++; x0 = c < x0 ? c : x0; x1 = c > x1 ? c : x1; y0 = r < y0 ? r : y0; y1 = r > y1 ? r : y1;
          end
      if (n < 4) continue;
      e.lab = L; e.x0 = x0; e.x1 = x1; e.y0 = y0; e.y1 = y1;
      for (int v = 0; v < 16; v++)
        for (int u = 0; u < 16; u++) begin
          real xs, ys, fx, fy, val;
          int ix, iy, ix1, iy1;
          xs = x0 + (u + 0.5) * (x1 - x0 + 1) / 16.0 - 0.5;
          ys = y0 + (v + 0.5) * (y1 - y0 + 1) / 16.0 - 0.5;
          xs = xs < x0 ? x0 : (xs > x1 ? x1 : xs);
          ys = ys < y0 ? y0 : (ys > y1 ? y1 : ys);
          ix = $rtoi($floor(xs)); iy = $rtoi($floor(ys));
          fx = xs - ix; fy = ys - iy;
          ix1 = (ix < x1) ? ix + 1 : ix; iy1 = (iy < y1) ? iy + 1 : iy;
          val = (1-fx)*(1-fy)*(lab[ix][iy] == L) + fx*(1-fy)*(lab[ix1][iy] == L) +
                (1-fx)*fy*(lab[ix][iy1] == L) + fx*fy*(lab[ix1][iy1] == L);
          e.pat.img[v*16 + u] = (val >= 0.5);
        end
      begin
        int m, sx, sy, sxx, syy, sxy, cx, cy;
        m = 0; sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0;
        for (int y = 0; y < 16; y++)
          for (int x = 0; x < 16; x++)
            if (e.pat.img[y*16 + x]) begin m++; sx += x; sy += y; sxx += x*x; syy += y*y; sxy += x*y; end
        e.pat.feat = '0;
        if (m != 0) begin
          cx = sx*16/m; cy = sy*16/m;
          e.pat.feat[0] = 8'(m > 255 ? 255 : m);
          e.pat.feat[1] = 8'(cx); e.pat.feat[2] = 8'(cy);
          e.pat.feat[3] = 8'(clampi(sxx*16/m - cx*cx/16, 0, 255));
          e.pat.feat[4] = 8'(clampi(syy*16/m - cy*cy/16, 0, 255));
          e.pat.feat[5] = 8'(clampi(sxy*16/m - cx*cy/16 + 128, 0, 255));
        end
      end
      e.lr = learn(e.pat);
      expq.push_back(e);
    end
  endtask

  // Splits the column stream into word frames like the capture stage.
  int n_frames = 0;
  task automatic model_capture();
    col_t fr [$];
    int blank_run, last_ink;
    bit seen;
    seen = 0; blank_run = 0; last_ink = 0;
    foreach (stream[i]) begin
      bit ink; ink = 0;
      for (int r = 0; r < H; r++) if (stream[i][r] < 128) ink = 1;
      if (!ink && !seen) begin
        if (fr.size() == 0) fr.push_back(stream[i]);     // left margin
      end else if (ink) begin
        fr.push_back(stream[i]); last_ink = fr.size() - 1; seen = 1; blank_run = 0;
        if (fr.size() == WM) begin model_frame(fr); fr.delete(); seen = 0; n_frames++; m_wmax++; end
      end else if (seen) begin
        fr.push_back(stream[i]); blank_run++;
        if (blank_run >= SP || fr.size() == WM) begin
          while (fr.size() > last_ink + 2) void'(fr.pop_back());
          model_frame(fr); fr.delete(); seen = 0; blank_run = 0; n_frames++; m_space++;
        end
      end
    end
  endtask

  // ---------------------------------------------------------------- checking
  int got = 0, frames_done = 0;
  always @(posedge clk) begin
    if (rst_n && frame_done) frames_done++;
    if (rst_n && res_valid) begin
      exp_t e;
      if (got >= expq.size()) begin
        checks++; failures++; $display("FAIL: unexpected result %0d", got);
      end else begin
        e = expq[got];
        checks++;
        if (int'(res_label) != e.lab || int'(res_x0) != e.x0 || int'(res_x1) != e.x1 ||
            int'(res_y0) != e.y0 || int'(res_y1) != e.y1) begin
          failures++;
          $display("FAIL: result %0d label %0d box %0d-%0d,%0d-%0d exp label %0d box %0d-%0d,%0d-%0d", got,
                   res_label, res_x0, res_x1, res_y0, res_y1, e.lab, e.x0, e.x1, e.y0, e.y1);
        end
        checks++;
        if (res_pat != e.pat) begin failures++; $display("FAIL: result %0d pattern differs", got); end
        checks++;
        if (res.is_new != e.lr.is_new || res.evicted != e.lr.evicted || res.updated != e.lr.updated ||
            res.addr != e.lr.addr || res.rank != e.lr.rank ||
            (!e.lr.is_new && (res.reliable != e.lr.reliable || res.distance != e.lr.distance))) begin
          failures++;
          $display("FAIL: result %0d learn new %0d/%0d ev %0d/%0d upd %0d/%0d addr %0d/%0d rank %0d/%0d rel %0d/%0d d %0d/%0d",
                   got, res.is_new, e.lr.is_new, res.evicted, e.lr.evicted, res.updated, e.lr.updated,
                   res.addr, e.lr.addr, res.rank, e.lr.rank, res.reliable, e.lr.reliable, res.distance, e.lr.distance);
        end
      end
      got++;
    end
  end

  initial begin
    foreach (rvalid[i]) rvalid[i] = 0;
    for (int k = 0; k < 3; k++) stream.push_back(blank_col());   // dropped leading blanks
    add_word('{0, 1}, 3, 2);          // L T
    add_word('{2, 3, 4}, 3, 2);       // O E F
    add_word('{0, 0, 0}, 3, 1);       // L L L
    add_word('{1, 1}, 3, 0);          // T T
    add_word('{5, 6, 3, 4}, 3, 0);    // C P E F: wider than W_MAX
    add_word('{3, 4, 3}, 2, 1);       // E F E, smaller
    for (int t = 0; t < 4; t++) begin
      int gl [];
      gl = new[$urandom_range(1, 3)];
      foreach (gl[i]) gl[i] = $urandom_range(0, 6);
      add_word(gl, $urandom_range(2, 3), 1);
    end
    model_capture();
    $display("model: %0d frames, %0d characters", n_frames, expq.size());

    repeat (3) @(posedge clk); rst_n = 1;
    foreach (stream[i])
      for (int r = 0; r < H; r++) begin
        @(negedge clk); pix_valid = 1; pix = 8'(stream[i][r]);
        @(posedge clk); while (!pix_ready) @(posedge clk);
      end
    @(negedge clk); pix_valid = 0;
    while (frames_done < n_frames) @(posedge clk);
    repeat (10) @(posedge clk);
    check(got == expq.size(), $sformatf("results %0d expected %0d", got, expq.size()));
    $display("mechanisms: space %0d wmax %0d specks %0d new_long %0d new_short %0d evict %0d known %0d reliable %0d unreliable %0d renew %0d",
             m_space, m_wmax, m_speck, m_new_long, m_new_short, m_evict, m_known, m_rel, m_unrel, m_upd);
    check(m_space > 0 && m_wmax > 0 && m_speck > 0 && m_new_long > 0 && m_new_short > 0 && m_evict > 0 &&
          m_rel > 0 && m_unrel > 0 && m_upd > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
