// tb_median_filter: filters a random 6x5 gray frame with salt-and-pepper
// pixels and compares every output pixel with a median computed here by
// counting (the smallest value v with at least five neighbours <= v), with
// edge-clamped neighbours; also checks the 9 clocks/pixel rate.
module tb_median_filter;
  localparam int H = 6, WM = 5, W = 5, AW = $clog2(H*WM), CW = $clog2(WM+1);
  logic clk = 0, rst_n = 0, start = 0, busy, done, dst_we;
  logic [CW-1:0] width = CW'(W);
  logic [AW-1:0] src_raddr, dst_waddr;
  logic [7:0] src_rdata, dst_wdata;
  logic [7:0] src [H*WM], dst [H*WM];
  int checks = 0, failures = 0, cycles = 0;

  median_filter #(.FRAME_H(H), .W_MAX(WM)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    src_rdata <= src[src_raddr];
    if (dst_we) dst[dst_waddr] <= dst_wdata;
  end

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int px(input int c, input int r);
    c = c < 0 ? 0 : (c > W-1 ? W-1 : c);
    r = r < 0 ? 0 : (r > H-1 ? H-1 : r);
    return int'(src[c*H + r]);
  endfunction

  initial begin
    for (int i = 0; i < H*WM; i++) begin
      int k; k = $urandom_range(0, 9);
      src[i] = (k == 0) ? 8'd0 : (k == 1) ? 8'd255 : 8'($urandom_range(90, 140));
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin @(posedge clk); cycles++; #1; end
    @(posedge clk); #1;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        int med;
        med = -1;
        for (int v = 0; v < 256 && med < 0; v++) begin
          int n; n = 0;
          for (int dx = -1; dx <= 1; dx++)
            for (int dy = -1; dy <= 1; dy++) if (px(c+dx, r+dy) <= v) n++;
          if (n >= 5) med = v;
        end
        checks++;
        if (int'(dst[c*H + r]) != med) begin
          failures++; $display("FAIL c%0d r%0d got %0d exp %0d", c, r, dst[c*H+r], med);
        end
      end
    checks++;
    if (cycles < 9*H*W || cycles > 9*H*W + 3) begin
      failures++; $display("FAIL cycles %0d", cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
