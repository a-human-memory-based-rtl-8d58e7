// tb_binarizer: binarizes a 9x7 gray frame with dark thin strokes on a light
// background and compares every bit with the rule worked out here:
// black iff pixel < mean of the clamped 5x5 window - OFFSET (done in real
// arithmetic, edge pixels repeated outside the frame); also checks the 25 clocks/pixel rate.
module tb_binarizer;
  localparam int H = 9, WM = 7, W = 7, R = 2, OFF = 8, AW = $clog2(H*WM), CW = $clog2(WM+1);
  logic clk = 0, rst_n = 0, start = 0, busy, done, dst_we, dst_wdata;
  logic [CW-1:0] width = CW'(W);
  logic [AW-1:0] src_raddr, dst_waddr;
  logic [7:0] src_rdata;
  logic [7:0] src [H*WM];
  logic dst [H*WM];
  int checks = 0, failures = 0, cycles = 0, blacks = 0;

  binarizer #(.FRAME_H(H), .W_MAX(WM), .R(R), .OFFSET(OFF)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    src_rdata <= src[src_raddr];
    if (dst_we) dst[dst_waddr] <= dst_wdata;
  end

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int px(input int c, input int r);
    c = c < 0 ? 0 : (c > W-1 ? W-1 : c);
    r = r < 0 ? 0 : (r > H-1 ? H-1 : r);
    return int'(src[c*H + r]);
  endfunction

  initial begin
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++)
        src[c*H + r] = (c == 3 || c == 0 || r == 4) ? 8'($urandom_range(10, 60)) : 8'($urandom_range(180, 230));
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin @(posedge clk); cycles++; #1; end
    @(posedge clk); #1;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        real mean; bit exp;
        mean = 0;
        for (int dx = -R; dx <= R; dx++)
          for (int dy = -R; dy <= R; dy++) mean += px(c+dx, r+dy);
        mean = mean / ((2*R+1)*(2*R+1));
        exp = real'(px(c, r)) < mean - OFF;
        checks++;
        if (dst[c*H + r] != exp) begin
          failures++; $display("FAIL c%0d r%0d got %0d exp %0d", c, r, dst[c*H+r], exp);
        end
        blacks += exp;
      end
    checks++;
    if (cycles < 25*H*W || cycles > 25*H*W + 3 || blacks < 10) begin
      failures++; $display("FAIL cycles %0d blacks %0d", cycles, blacks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
