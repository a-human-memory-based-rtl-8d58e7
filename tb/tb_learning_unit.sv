// tb_learning_unit: runs a stream of noisy versions of 12 prototype patterns
// through a learning_unit with 8 references (4 long-term ranks), N_th=3.
// A complete model of the learning procedure written here (nearest-match
// search, D < D_th decision, reliability margin, ranking list, mean-based
// renewal) predicts every result: new/known, reliable, forgotten, renewed,
// address, distance and rank. Counts and requires each mechanism: new
// reference into long-term and into short-term memory, forgetting, reliable
// and unreliable matches, renewal of a reference. Also checks the result
// latency of N_REF+9 (new) or N_REF+10 (known) clocks. D_th starts at 40
// here so that a reference between two others can be built.
module tb_learning_unit;
  import ocr_pkg::*;
  localparam int N = 8, S = 4, JS = 5, JL = 8, JLOW = 1, C = 16, NTH = 3;
  localparam int DI = 40, DMIN = 16, DMAX = 384, NW = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, res_valid;
  pattern_t in_pat;
  learn_result_t res;
  logic [NW-1:0] ref_count;
  int checks = 0, failures = 0;
  int n_new_long = 0, n_new_short = 0, n_evict = 0, n_rel = 0, n_unrel = 0, n_upd = 0;

  // model state
  pattern_t refs [N];
  bit       valid [N];
  int dth [N], cnt [N], dsum [N];
  int fsum [N][FEAT_N];
  int pcnt [N][256];
  int q [$];

  learning_unit #(.N_REF(N), .S_POS(S), .JS(JS), .JL(JL), .JLOW(JLOW), .C(C), .NTH(NTH),
                  .DTH_INIT(DI), .DTH_MIN(DMIN), .DTH_MAX(DMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int mdist(input pattern_t a, input pattern_t b);
    int h, s;
    h = 0; s = 0;
    for (int i = 0; i < 256; i++) h += (a.img[i] != b.img[i]);
    for (int k = 0; k < FEAT_N; k++) s += (int'(a.feat[k]) - int'(b.feat[k])) ** 2;
    return h + 4 * $rtoi($floor($sqrt(real'(s)) + 1e-9));
  endfunction

  task automatic restart(input int a, input pattern_t p, input int t);
    refs[a] = p; valid[a] = 1; dth[a] = t; cnt[a] = 1; dsum[a] = t / 2;
    for (int k = 0; k < FEAT_N; k++) fsum[a][k] = p.feat[k];
    for (int i = 0; i < 256; i++) pcnt[a][i] = p.img[i];
  endtask

  task automatic step(input pattern_t p);
    int w, l, dw, dl, d, pos, j, addr, cycles;
    bit known, rel, ev, upd;
    w = -1; l = -1; dw = 0; dl = 0;
    for (int a = 0; a < N; a++) if (valid[a]) begin
      d = mdist(p, refs[a]);
      if (w < 0 || d < dw) begin l = w; dl = dw; w = a; dw = d; end
      else if (l < 0 || d < dl) begin l = a; dl = d; end
    end
    known = (w >= 0) && dw < dth[w];
    rel = known && (l < 0 || dl - dw > C);
    ev = 0; upd = 0;
    if (!known) begin
      if (q.size() < S) begin addr = q.size(); q.push_back(addr); pos = q.size() - 1; n_new_long++; end
      else begin
        if (q.size() == N) begin addr = q.pop_back(); ev = 1; n_evict++; end
        else addr = q.size();
        q.insert(S, addr); pos = S; n_new_short++;
      end
      restart(addr, p, DI);
    end else begin
      int old;
      addr = w;
      foreach (q[i]) if (q[i] == w) old = i;
      j = !rel ? JLOW : (old < S ? JL : JS);
      pos = old - j < 0 ? 0 : old - j;
      q.delete(old); q.insert(pos, w);
      if (rel) n_rel++; else n_unrel++;
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
        upd = 1; n_upd++;
      end
    end
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_pat = p;
    @(negedge clk); in_valid = 0;
    cycles = 1;
    while (!res_valid) begin @(negedge clk); cycles++; end
    checks++;
    if (res.is_new != !known || res.evicted != ev || res.updated != upd || int'(res.addr) != addr ||
        int'(res.rank) != pos || (known && (res.reliable != rel || int'(res.distance) != dw))) begin
      failures++;
      $display("FAIL res new %0d/%0d ev %0d/%0d upd %0d/%0d addr %0d/%0d rank %0d/%0d rel %0d/%0d dist %0d/%0d",
               res.is_new, !known, res.evicted, ev, res.updated, upd, res.addr, addr, res.rank, pos,
               res.reliable, rel, res.distance, dw);
    end
    checks++;
    if (int'(ref_count) != q.size()) begin failures++; $display("FAIL count"); end
    checks++;
    if (cycles != N + (known ? 10 : 9)) begin failures++; $display("FAIL latency %0d", cycles); end
  endtask

  initial begin
    pattern_t proto [12];
    foreach (valid[i]) valid[i] = 0;
    in_pat = '0;
    foreach (proto[i]) begin
      for (int b = 0; b < 8; b++) proto[i].img[b*32 +: 32] = $urandom;
      for (int k = 0; k < FEAT_N; k++) proto[i].feat[k] = 8'($urandom_range(30, 220));
    end
    repeat (3) @(posedge clk); rst_n = 1;
    // A second reference 50 pixels away from the first, then an input half
    // way between them: a known but unreliable match.
    begin
      pattern_t a, b, h;
      a = proto[0]; b = a; h = a;
      for (int i = 0; i < 50; i++) begin b.img[i*5] ^= 1'b1; if (i < 25) h.img[i*5] ^= 1'b1; end
      step(a); step(b); step(h);
    end
    for (int t = 0; t < 200; t++) begin
      pattern_t p; int k;
      // early on use few prototypes so matches occur, later all twelve
      k = (t < 60) ? $urandom_range(0, 5) : $urandom_range(0, 11);
      p = proto[k];
      for (int j = $urandom_range(0, (t % 7 == 0) ? 60 : 12); j > 0; j--) p.img[$urandom_range(0, 255)] ^= 1'b1;
      for (int f = 0; f < FEAT_N; f++) p.feat[f] = 8'(int'(p.feat[f]) + $urandom_range(0, 4) - 2);
      step(p);
    end
    $display("mechanisms: new_long %0d new_short %0d evict %0d reliable %0d unreliable %0d renew %0d",
             n_new_long, n_new_short, n_evict, n_rel, n_unrel, n_upd);
    checks++;
    if (n_new_long == 0 || n_new_short == 0 || n_evict == 0 || n_rel == 0 || n_unrel == 0 || n_upd == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
