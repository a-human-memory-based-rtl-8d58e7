// tb_assoc_search: fills a 16-entry ref_memory (some entries left invalid)
// with patterns derived from the query by flipping pixels and shifting
// features, then checks winner and nearest-loser address and distance
// against a search done here (Hamming count + 4*floor(sqrt) of the feature
// distance via $sqrt), the empty-memory and one-entry cases, and the
// N_REF+1 clock search time.
module tb_assoc_search;
  import ocr_pkg::*;
  localparam int N = 16, AW = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done, found, los_found, rd_valid;
  logic we = 0;
  logic [AW-1:0] waddr = 0, rd_addr, win_addr, los_addr;
  pattern_t wdata, query, rd_data;
  dist_t win_dist, los_dist;
  pattern_t model [N];
  bit mvalid [N];
  int checks = 0, failures = 0;

  ref_memory #(.N_REF(N)) u_mem (.clk, .rst_n, .we, .waddr, .wdata, .raddr(rd_addr), .rdata(rd_data), .rvalid(rd_valid));
  assoc_search #(.N_REF(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int ref_dist(input pattern_t a, input pattern_t b);
    int h, s;
    h = 0; s = 0;
    for (int i = 0; i < 256; i++) h += (a.img[i] != b.img[i]);
    for (int k = 0; k < FEAT_N; k++) s += (int'(a.feat[k]) - int'(b.feat[k])) ** 2;
    return h + 4 * $rtoi($floor($sqrt(real'(s)) + 1e-9));
  endfunction

  task automatic write(input int a, input pattern_t p);
    @(negedge clk); we = 1; waddr = AW'(a); wdata = p; @(negedge clk); we = 0;
    model[a] = p; mvalid[a] = 1;
  endtask

  task automatic search_and_check();
    int bw, bl, dw, dl, cycles, d;
    bw = -1; bl = -1; dw = 0; dl = 0;
    for (int a = 0; a < N; a++) if (mvalid[a]) begin
      d = ref_dist(query, model[a]);
      if (bw < 0 || d < dw) begin bl = bw; dl = dw; bw = a; dw = d; end
      else if (bl < 0 || d < dl) begin bl = a; dl = d; end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; #1; end
    checks++;
    if (found != (bw >= 0) || (bw >= 0 && (int'(win_addr) != bw || int'(win_dist) != dw)) ||
        los_found != (bl >= 0) || (bl >= 0 && (int'(los_addr) != bl || int'(los_dist) != dl))) begin
      failures++;
      $display("FAIL win %0d/%0d exp %0d/%0d  los %0d/%0d exp %0d/%0d", win_addr, win_dist, bw, dw,
               los_addr, los_dist, bl, dl);
    end
    checks++;
    if (cycles != N + 2) begin failures++; $display("FAIL cycles %0d", cycles); end
  endtask

  initial begin
    foreach (mvalid[i]) mvalid[i] = 0;
    for (int i = 0; i < 8; i++) query.img[i*32 +: 32] = $urandom;
    for (int k = 0; k < FEAT_N; k++) query.feat[k] = 8'($urandom);
    repeat (3) @(posedge clk); rst_n = 1;
    search_and_check();                       // empty
    write(5, query); search_and_check();      // one entry, exact
    for (int t = 0; t < 12; t++) begin
      int a; pattern_t p;
      a = $urandom_range(0, N-1);
      p = query;
      for (int j = $urandom_range(0, 40); j > 0; j--) p.img[$urandom_range(0, 255)] ^= 1'b1;
      for (int k = 0; k < FEAT_N; k++) p.feat[k] = 8'(int'(p.feat[k]) + $urandom_range(0, 20) - 10);
      write(a, p);
      search_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
