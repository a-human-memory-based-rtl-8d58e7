// tb_window_scan: checks the neighbourhood read sequence of window_scan on a
// 5-row, 4-column frame with R=1: every read address against the clamped
// neighbour computed here, the first/centre/last/inside strobes, the centre address,
// the number of taps and the done pulse.
module tb_window_scan;
  localparam int H = 5, WM = 6, R = 1, AW = $clog2(H*WM), CW = $clog2(WM+1);
  localparam int W = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [CW-1:0] width = CW'(W);
  logic [AW-1:0] rd_addr, center_addr, addr_q;
  logic tap_valid, tap_first, tap_center, tap_last, tap_inside;
  int checks = 0, failures = 0, taps = 0, dones = 0;

  window_scan #(.FRAME_H(H), .W_MAX(WM), .R(R)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) addr_q <= rd_addr;   // what a RAM would return for

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int clampi(input int v, input int lo, input int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++)
        for (int dx = -R; dx <= R; dx++)
          for (int dy = -R; dy <= R; dy++) begin
            int ea;
            while (!tap_valid) @(negedge clk);
            ea = clampi(c + dx, 0, W-1) * H + clampi(r + dy, 0, H-1);
            checks++;
            if (int'(addr_q) != ea || tap_first != (dx == -R && dy == -R) ||
                tap_center != (dx == 0 && dy == 0) || tap_last != (dx == R && dy == R) ||
                int'(center_addr) != c*H + r ||
                tap_inside != (c+dx >= 0 && c+dx < W && r+dy >= 0 && r+dy < H)) begin
              failures++;
              $display("FAIL c%0d r%0d dx%0d dy%0d addr %0d exp %0d", c, r, dx, dy, addr_q, ea);
            end
            taps++;
            if (done) dones++;
            @(negedge clk);
          end
    checks++;
    if (tap_valid || dones != 1) begin failures++; $display("FAIL end: dones=%0d", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
