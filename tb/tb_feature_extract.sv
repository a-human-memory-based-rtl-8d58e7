// tb_feature_extract: random and special 16x16 images; the six features are
// recomputed here from the pixel coordinates (mass, centroid in 4.4, second
// central moments in 4.4, covariance offset by 128, with the same
// truncations and clamps) and compared; also the empty image and the
// 262-clock latency.
module tb_feature_extract;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  ocr_pkg::img_t img;
  ocr_pkg::feat_t feat;
  int checks = 0, failures = 0;

  feature_extract dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int clamp8(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic run_img(input ocr_pkg::img_t im);
    int m, sx, sy, sxx, syy, sxy, cx, cy, e [6], cycles;
    m = 0; sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        if (im[y*16 + x]) begin
          m++; sx += x; sy += y; sxx += x*x; syy += y*y; sxy += x*y;
        end
    if (m == 0) e = '{0, 0, 0, 0, 0, 0};
    else begin
      cx = sx*16/m; cy = sy*16/m;
      e[0] = m > 255 ? 255 : m;
      e[1] = cx; e[2] = cy;
      e[3] = clamp8(sxx*16/m - cx*cx/16);
      e[4] = clamp8(syy*16/m - cy*cy/16);
      e[5] = clamp8(sxy*16/m - cx*cy/16 + 128);
    end
    img = im;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; #1; end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (int'(feat[k]) != e[k]) begin failures++; $display("FAIL feat %0d got %0d exp %0d (m=%0d)", k, feat[k], e[k], m); end
    end
    checks++;
    if (cycles != 262) begin failures++; $display("FAIL latency %0d", cycles); end
  endtask

  initial begin
    ocr_pkg::img_t im;
    repeat (3) @(posedge clk); rst_n = 1;
    run_img('0);
    run_img('1);
    im = '0; for (int i = 0; i < 16; i++) im[i*16 + i] = 1'b1; run_img(im);          // diagonal
    im = '0; for (int i = 0; i < 16; i++) im[i*16 + 15 - i] = 1'b1; run_img(im);     // anti-diagonal
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 8; i++) im[i*32 +: 32] = $urandom;
      run_img(im);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
