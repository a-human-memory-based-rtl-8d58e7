// tb_reliability_check: random winner/loser distances around the margin
// C=16 and the no-loser case, checked against (loser - winner) > C.
module tb_reliability_check;
  import ocr_pkg::*;
  dist_t win_dist, los_dist;
  logic los_found, reliable;
  int checks = 0, failures = 0;

  reliability_check #(.C(16)) dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int w, l;
      w = $urandom_range(0, 3000);
      l = w + $urandom_range(0, 40) - 5;
      if (l < 0) l = 0;
      if (l > 4095) l = 4095;
      win_dist = dist_t'(w); los_dist = dist_t'(l); los_found = ($urandom_range(0, 9) != 0);
      #1;
      checks++;
      if (reliable != (!los_found || (l - w) > 16)) begin
        failures++; $display("FAIL w %0d l %0d f %0d got %0d", w, l, los_found, reliable);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
