// tb_optimization_unit: new-reference and matched-input operations on an
// 8-entry optimization_unit with N_th=3. A model written here keeps the
// counter, the per-pixel black counts, feature sums and distance sum of every
// reference and predicts each reference-memory write (input pattern for a
// new reference, pixel majority / feature means for a renewal), the
// threshold D_th read back after each operation, op_updated, and the 2- and
// 3-clock operation times. Renewals and threshold clamping must occur.
module tb_optimization_unit;
  import ocr_pkg::*;
  localparam int N = 8, NTH = 3, DI = 96, DMIN = 16, DMAX = 384, AW = 3;
  logic clk = 0, rst_n = 0, op_valid = 0, op_new = 0, op_done, op_updated, ref_we;
  logic [AW-1:0] op_addr = 0, ref_waddr, dth_raddr = 0;
  pattern_t op_pat, ref_wdata;
  dist_t op_dist, dth_rdata;
  int checks = 0, failures = 0, renewals = 0, clamps = 0;
  int m_cnt [N], m_dsum [N], m_dth [N];
  int m_fsum [N][FEAT_N];
  int m_pcnt [N][256];
  pattern_t last_write;
  int n_writes = 0;

  optimization_unit #(.N_REF(N), .NTH(NTH), .DTH_INIT(DI), .DTH_MIN(DMIN), .DTH_MAX(DMAX)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (ref_we) begin last_write <= ref_wdata; n_writes <= n_writes + 1; end

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic restart(input int a, input pattern_t p, input int t);
    m_cnt[a] = 1; m_dsum[a] = t / 2; m_dth[a] = t;
    for (int k = 0; k < FEAT_N; k++) m_fsum[a][k] = p.feat[k];
    for (int i = 0; i < 256; i++) m_pcnt[a][i] = p.img[i];
  endtask

  task automatic do_op(input bit is_new, input int a, input pattern_t p, input int d);
    int cycles, w0;
    bit exp_upd;
    pattern_t exp_w;
    exp_upd = 0;
    if (is_new) begin restart(a, p, DI); exp_w = p; end
    else begin
      m_cnt[a]++; m_dsum[a] += d;
      for (int k = 0; k < FEAT_N; k++) m_fsum[a][k] += p.feat[k];
      for (int i = 0; i < 256; i++) m_pcnt[a][i] += p.img[i];
      if (m_cnt[a] > NTH) begin
        int t;
        exp_upd = 1; renewals++;
        for (int i = 0; i < 256; i++) exp_w.img[i] = 2 * m_pcnt[a][i] >= m_cnt[a];
        for (int k = 0; k < FEAT_N; k++) exp_w.feat[k] = 8'(m_fsum[a][k] / m_cnt[a]);
        t = 2 * m_dsum[a] / m_cnt[a];
        if (t < DMIN || t > DMAX) clamps++;
        t = t < DMIN ? DMIN : (t > DMAX ? DMAX : t);
        restart(a, exp_w, t);
      end
    end
    w0 = n_writes;
    @(negedge clk); op_valid = 1; op_new = is_new; op_addr = AW'(a); op_pat = p; op_dist = dist_t'(d);
    @(negedge clk); op_valid = 0;
    cycles = 1;
    while (!op_done) begin @(negedge clk); cycles++; end
    check(cycles == (is_new ? 2 : 3), $sformatf("op time %0d", cycles));
    check(op_updated == exp_upd, "op_updated");
    check((n_writes - w0) == ((is_new || exp_upd) ? 1 : 0), "number of ref writes");
    if (is_new || exp_upd) check(last_write == exp_w, $sformatf("ref write addr %0d", a));
    dth_raddr = AW'(a); #1;
    check(int'(dth_rdata) == m_dth[a], $sformatf("dth %0d exp %0d", dth_rdata, m_dth[a]));
  endtask

  function automatic pattern_t noisy(input pattern_t p, input int flips);
    for (int j = 0; j < flips; j++) p.img[$urandom_range(0, 255)] ^= 1'b1;
    for (int k = 0; k < FEAT_N; k++) p.feat[k] = 8'(int'(p.feat[k]) + $urandom_range(0, 6) - 3);
    return p;
  endfunction

  initial begin
    pattern_t base [N];
    op_pat = '0; op_dist = '0;
    for (int a = 0; a < N; a++) begin
      for (int i = 0; i < 8; i++) base[a].img[i*32 +: 32] = $urandom;
      for (int k = 0; k < FEAT_N; k++) base[a].feat[k] = 8'($urandom_range(20, 230));
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int a = 0; a < N; a++) do_op(1, a, base[a], 0);
    for (int t = 0; t < 120; t++) begin
      int a; a = $urandom_range(0, N-1);
      if ($urandom_range(0, 15) == 0) do_op(1, a, noisy(base[a], 10), 0);
      else do_op(0, a, noisy(base[a], $urandom_range(0, 30)),
                 (a == 0) ? $urandom_range(0, 4) : (a == 1) ? $urandom_range(200, 300) : $urandom_range(10, 90));
    end
    check(renewals > 5 && clamps > 0, $sformatf("renewals %0d clamps %0d", renewals, clamps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
