// tb_segmentation: fills a 12x10 label memory with random labels 1..6 (one
// of them with fewer than MIN_PIX pixels) and checks that every label with
// at least MIN_PIX pixels is offered once, in label order, with the bounding
// box and pixel count counted here, that small labels are skipped, that
// seg_valid holds until seg_ack, and that done follows the last label.
module tb_segmentation;
  localparam int H = 12, WM = 10, W = 10, LW = 8, MINP = 4;
  localparam int AW = $clog2(H*WM), RW = $clog2(H), CW = $clog2(WM+1);
  logic clk = 0, rst_n = 0, start = 0, busy, done, seg_valid, seg_ack = 0;
  logic [CW-1:0] width = CW'(W);
  logic [LW-1:0] num_labels = 6, lab_rdata, seg_label;
  logic [AW-1:0] lab_raddr;
  logic [CW-1:0] seg_x0, seg_x1;
  logic [RW-1:0] seg_y0, seg_y1;
  logic [AW:0] seg_count;
  logic [LW-1:0] labs [H*WM];
  int checks = 0, failures = 0;

  segmentation #(.FRAME_H(H), .W_MAX(WM), .LW(LW), .MIN_PIX(MINP)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) lab_rdata <= labs[lab_raddr];

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cnt [7], x0 [7], x1 [7], y0 [7], y1 [7];
    int expected [$];
    for (int i = 0; i < H*W; i++) labs[i] = ($urandom_range(0, 2) == 0) ? LW'($urandom_range(1, 6)) : '0;
    for (int i = 0; i < H*W; i++) if (labs[i] == 4) labs[i] = 0;
    labs[3*H + 5] = 4; labs[7*H + 2] = 4;   // label 4: two pixels, skipped
    for (int l = 1; l <= 6; l++) begin cnt[l] = 0; x0[l] = 99; y0[l] = 99; x1[l] = -1; y1[l] = -1; end
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        int l; l = labs[c*H + r];
        if (l != 0) begin
          cnt[l]++;
          if (c < x0[l]) x0[l] = c;
          if (c > x1[l]) x1[l] = c;
          if (r < y0[l]) y0[l] = r;
          if (r > y1[l]) y1[l] = r;
        end
      end
    for (int l = 1; l <= 6; l++) if (cnt[l] >= MINP) expected.push_back(l);
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    foreach (expected[i]) begin
      int l; l = expected[i];
      while (!seg_valid) @(negedge clk);
      checks++;
      if (int'(seg_label) != l || int'(seg_count) != cnt[l] || int'(seg_x0) != x0[l] ||
          int'(seg_x1) != x1[l] || int'(seg_y0) != y0[l] || int'(seg_y1) != y1[l]) begin
        failures++;
        $display("FAIL label %0d got %0d cnt %0d box %0d-%0d,%0d-%0d", l, seg_label, seg_count,
                 seg_x0, seg_x1, seg_y0, seg_y1);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (!seg_valid) begin failures++; $display("FAIL seg_valid dropped before ack"); end
      seg_ack = 1; @(negedge clk); seg_ack = 0;
    end
    while (busy) @(negedge clk);
    checks++;
    if (seg_valid) begin failures++; $display("FAIL extra segment"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
