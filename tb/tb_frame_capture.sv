// tb_frame_capture: streams columns into frame_capture and checks that of the
// leading blank columns one is kept as a left margin, that a single blank column inside a word is
// kept, that two blank columns (SPACE_COLS=2) close the frame one margin
// column after the last ink column, that the frame closes at W_MAX, that pix_ready drops
// while a frame is held, and that every pixel lands at col*FRAME_H+row.
module tb_frame_capture;
  localparam int H = 4, WM = 8, AW = $clog2(H*WM), CW = $clog2(WM+1);
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_ready, wr_en, frame_valid, frame_release = 0;
  logic [7:0] pix = 0, wr_data;
  logic [AW-1:0] wr_addr;
  logic [CW-1:0] frame_width;
  logic [7:0] mem [H*WM];
  int checks = 0, failures = 0;

  frame_capture #(.FRAME_H(H), .W_MAX(WM), .SPACE_COLS(2)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (wr_en) mem[wr_addr] <= wr_data;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One column: ink puts a dark pixel at row (seed % H).
  task automatic send_col(input bit ink, input int seed);
    for (int r = 0; r < H; r++) begin
      @(negedge clk);
      pix_valid = 1;
      pix = (ink && r == seed % H) ? 8'd20 : 8'(200 + r + seed);
      @(posedge clk);
      while (!pix_ready) @(posedge clk);
    end
    @(negedge clk); pix_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    send_col(0, 0); send_col(0, 1);                 // dropped
    send_col(1, 2); send_col(1, 3); send_col(0, 4); send_col(1, 5); // word of 4 columns
    send_col(0, 6);
    check(!frame_valid, "one blank column does not close the frame");
    send_col(0, 7);                                 // second blank column: word space
    @(posedge clk); #1;
    check(frame_valid, "frame closed by blank column");
    check(frame_width == 6, "width 6: margin, 4 word columns, margin");
    check(!pix_ready, "pix_ready low while held");
    for (int r = 0; r < H; r++) check(mem[r] == 8'(200 + r + 0), "margin column stored");
    for (int c = 1; c < 6; c++)
      for (int r = 0; r < H; r++) begin
        int seed; seed = c + 1;
        check(mem[c*H + r] == ((c != 3 && c != 5 && r == seed % H) ? 8'd20 : 8'(200 + r + seed)), "pixel stored");
      end
    @(negedge clk); frame_release = 1; @(negedge clk); frame_release = 0;
    check(!frame_valid && pix_ready, "released");
    for (int c = 0; c < WM; c++) send_col(1, c);   // closes at W_MAX
    @(posedge clk); #1;
    check(frame_valid && frame_width == WM, "frame closed at W_MAX");
    check(mem[(WM-1)*H + ((WM-1) % H)] == 8'd20 && mem[0] == 8'd20, "no margin, last column stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
