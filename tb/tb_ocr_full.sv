// tb_ocr_full: the recognizer at its default size (1024-row sensor frames,
// up to 128 columns per word, 512 references). Two words, each the letters
// L and T drawn 3 pixels per glyph cell around row 500, are streamed column
// by column. The first word must give two new references (addresses 0 and 1,
// long-term ranks 0 and 1) with the drawn bounding boxes; the identical
// second word must give two known, reliable matches at distance 0 with the
// same addresses.
module tb_ocr_full;
  import ocr_pkg::*;
  localparam int H = 1024, WM = 128, SP = 8, TOP = 500;
  logic clk = 0, rst_n = 0, pix_valid = 0, pix_ready, res_valid, frame_done;
  logic [7:0] pix = 0;
  learn_result_t res;
  logic [7:0] res_label;
  logic [7:0] res_x0, res_x1;
  logic [9:0] res_y0, res_y1;
  pattern_t res_pat;
  logic [9:0] ref_count;
  int checks = 0, failures = 0, got = 0, frames = 0;
  learn_result_t rq [$];
  int bx0 [$], bx1 [$], by0 [$], by1 [$];

  ocr_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (8000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (frame_done) frames++;
    if (res_valid) begin
      rq.push_back(res);
      $display("result label %0d box %0d-%0d,%0d-%0d new %0d addr %0d d %0d", res_label, res_x0, res_x1, res_y0, res_y1, res.is_new, res.addr, res.distance);
      bx0.push_back(res_x0); bx1.push_back(res_x1); by0.push_back(res_y0); by1.push_back(res_y1);
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  string glyph [2][7] = '{
    '{"10000","10000","10000","10000","10000","10000","11111"},   // L
    '{"11111","00100","00100","00100","00100","00100","00100"}};  // T

  task automatic send_col(input int g, input int gx, input bit ink);
    for (int r = 0; r < H; r++) begin
      int gy; bit dark;
      gy = (r - TOP) / 3;
      dark = ink && r >= TOP && r < TOP + 21 && glyph[g][gy][gx] == "1";
      @(negedge clk); pix_valid = 1; pix = dark ? 8'd25 : 8'(190 + (r % 7));
      @(posedge clk); while (!pix_ready) @(posedge clk);
    end
  endtask

  task automatic send_word();
    send_col(0, 0, 0);                               // leading blank, dropped
    for (int gx = 0; gx < 5; gx++) for (int s = 0; s < 3; s++) send_col(0, gx, 1);
    for (int k = 0; k < 2; k++) send_col(0, 0, 0);
    for (int gx = 0; gx < 5; gx++) for (int s = 0; s < 3; s++) send_col(1, gx, 1);
    for (int k = 0; k < SP; k++) send_col(0, 0, 0);
    @(negedge clk); pix_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    send_word();
    while (frames < 1) @(posedge clk);
    send_word();
    while (frames < 2) @(posedge clk);
    repeat (5) @(posedge clk);
    check(rq.size() == 4, $sformatf("4 results, got %0d", rq.size()));
    if (rq.size() == 4) begin
      for (int i = 0; i < 4; i++) begin
        int ex0; ex0 = (i % 2) ? 18 : 1;
        check(int'(bx0[i]) == ex0 && int'(bx1[i]) == ex0 + 14 && int'(by0[i]) == TOP && int'(by1[i]) == TOP + 20,
              $sformatf("box %0d: %0d-%0d,%0d-%0d", i, bx0[i], bx1[i], by0[i], by1[i]));
        check(int'(rq[i].addr) == i % 2, $sformatf("address %0d: %0d", i, rq[i].addr));
      end
      check(rq[0].is_new && rq[1].is_new && rq[0].rank == 0 && rq[1].rank == 1, "first word learned");
      check(!rq[2].is_new && !rq[3].is_new && rq[2].distance == 0 && rq[3].distance == 0 &&
            rq[2].reliable && rq[3].reliable, "second word recognized");
    end
    check(int'(ref_count) == 2, "two references");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
