// tb_normalizer: resizes labelled boxes of several sizes (smaller and larger
// than 16) from a 40x40 label memory and compares each of the 256 output bits
// with bilinear interpolation done here in real arithmetic (sample position
// x0+(u+0.5)*w/16-0.5 clamped to the box, value >= 0.5 -> 1). Pixels of
// other labels inside the box must count as background. Also checks the
// 1280-clock duration.
module tb_normalizer;
  localparam int H = 40, WM = 40, LW = 8, AW = $clog2(H*WM), RW = $clog2(H), CW = $clog2(WM+1);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [LW-1:0] label, lab_rdata;
  logic [CW-1:0] x0, x1;
  logic [RW-1:0] y0, y1;
  logic [AW-1:0] lab_raddr;
  ocr_pkg::img_t img;
  logic [LW-1:0] labs [H*WM];
  int checks = 0, failures = 0;

  normalizer #(.FRAME_H(H), .W_MAX(WM), .LW(LW)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) lab_rdata <= labs[lab_raddr];

  initial begin
    repeat (40000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real hit(input int c, input int r);
    return (labs[c*H + r] == label) ? 1.0 : 0.0;
  endfunction

  task automatic run_box(input int bx0, input int bx1, input int by0, input int by1);
    int cycles, ones;
    for (int i = 0; i < H*WM; i++) labs[i] = 0;
    for (int c = bx0; c <= bx1; c++)
      for (int r = by0; r <= by1; r++)
        labs[c*H + r] = ($urandom_range(0, 2) != 0) ? 8'd3 : (($urandom_range(0, 3) == 0) ? 8'd5 : 8'd0);
    labs[bx0*H + by0] = 3; labs[bx1*H + by1] = 3;
    label = 3; x0 = CW'(bx0); x1 = CW'(bx1); y0 = RW'(by0); y1 = RW'(by1);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; #1; end
    ones = 0;
    for (int v = 0; v < 16; v++)
      for (int u = 0; u < 16; u++) begin
        real xs, ys, fx, fy, val;
        int ix, iy, ix1, iy1;
        xs = bx0 + (u + 0.5) * (bx1 - bx0 + 1) / 16.0 - 0.5;
        ys = by0 + (v + 0.5) * (by1 - by0 + 1) / 16.0 - 0.5;
        if (xs < bx0) xs = bx0;
        if (xs > bx1) xs = bx1;
        if (ys < by0) ys = by0;
        if (ys > by1) ys = by1;
        ix = $rtoi($floor(xs)); iy = $rtoi($floor(ys));
        fx = xs - ix; fy = ys - iy;
        ix1 = (ix < bx1) ? ix + 1 : ix; iy1 = (iy < by1) ? iy + 1 : iy;
        val = (1-fx)*(1-fy)*hit(ix, iy) + fx*(1-fy)*hit(ix1, iy) + (1-fx)*fy*hit(ix, iy1) + fx*fy*hit(ix1, iy1);
        checks++;
        if (img[v*16 + u] != (val >= 0.5)) begin
          failures++; $display("FAIL box %0d,%0d u%0d v%0d got %0d val %f", bx0, by0, u, v, img[v*16+u], val);
        end
        ones += img[v*16 + u];
      end
    checks++;
    if (cycles < 1280 || cycles > 1283 || ones == 0) begin failures++; $display("FAIL cycles %0d ones %0d", cycles, ones); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run_box(2, 33, 1, 38);
    run_box(5, 12, 20, 27);
    run_box(10, 10, 3, 20);
    run_box(0, 39, 0, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
