// tb_rank_memory: drives a 16-rank memory (long-term 0..7, short-term 8..15)
// with new-reference and known-winner operations and compares, after every
// operation, the whole rank list, the count and the res_* outputs with a
// queue-based model written here. Counts and requires each mechanism: fill
// of long-term memory, insertion at the top of short-term memory, forgetting
// of the lowest rank, jumps J_S, J_L and JLOW, and a move across the border.
module tb_rank_memory;
  localparam int N = 16, S = 8, JS = 5, JL = 8, JLOW = 1, AW = 4, NW = 5;
  logic clk = 0, rst_n = 0, op_valid = 0, op_new = 0, op_reliable = 0;
  logic [AW-1:0] op_addr = 0, res_addr, res_pos, res_old_pos, rd_pos = 0, rd_addr;
  logic op_done, res_found, res_long, res_evicted;
  logic [NW-1:0] count;
  int checks = 0, failures = 0;
  int n_fill = 0, n_ins = 0, n_evict = 0, n_js = 0, n_jl = 0, n_jlow = 0, n_cross = 0;
  int q [$];   // q[0] = top rank

  rank_memory #(.N_REF(N), .S_POS(S), .JS(JS), .JL(JL), .JLOW(JLOW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_op(input bit is_new, input int addr, input bit rel);
    int exp_addr, exp_pos, p, j;
    bit exp_ev;
    exp_ev = 0;
    if (is_new) begin
      if (q.size() < S) begin exp_addr = q.size(); q.push_back(exp_addr); exp_pos = q.size() - 1; n_fill++; end
      else begin
        if (q.size() == N) begin exp_addr = q.pop_back(); exp_ev = 1; n_evict++; end
        else exp_addr = q.size();
        q.insert(S, exp_addr); exp_pos = S; n_ins++;
      end
    end else begin
      p = -1;
      foreach (q[i]) if (q[i] == addr) p = i;
      j = !rel ? JLOW : (p < S ? JL : JS);
      if (!rel) n_jlow++; else if (p < S) n_jl++; else n_js++;
      exp_pos = p - j < 0 ? 0 : p - j;
      if (p >= S && exp_pos < S) n_cross++;
      q.delete(p); q.insert(exp_pos, addr); exp_addr = addr;
    end
    @(negedge clk); op_valid = 1; op_new = is_new; op_addr = AW'(addr); op_reliable = rel;
    @(negedge clk); op_valid = 0;
    check(op_done, "op_done");
    check(int'(res_addr) == exp_addr && int'(res_pos) == exp_pos && res_evicted == exp_ev,
          $sformatf("res addr %0d/%0d pos %0d/%0d ev %0d/%0d", res_addr, exp_addr, res_pos, exp_pos, res_evicted, exp_ev));
    check(int'(count) == q.size(), "count");
    foreach (q[i]) begin
      rd_pos = AW'(i); #1;
      check(int'(rd_addr) == q[i], $sformatf("rank %0d holds %0d exp %0d", i, rd_addr, q[i]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5; i++) do_op(1, 0, 0);
    do_op(0, 4, 1);                                    // long-term jump JL
    for (int i = 0; i < 6; i++) do_op(1, 0, 0);        // fills long-term, starts short-term
    for (int t = 0; t < 150; t++) begin
      if ($urandom_range(0, 2) == 0) do_op(1, 0, 0);
      else do_op(0, q[$urandom_range(0, q.size() - 1)], $urandom_range(0, 3) != 0);
    end
    check(n_fill > 0 && n_ins > 0 && n_evict > 0 && n_js > 0 && n_jl > 0 && n_jlow > 0 && n_cross > 0,
          $sformatf("mechanisms fill %0d ins %0d evict %0d js %0d jl %0d jlow %0d cross %0d",
                    n_fill, n_ins, n_evict, n_js, n_jl, n_jlow, n_cross));
    $display("mechanisms: fill %0d ins %0d evict %0d js %0d jl %0d jlow %0d cross %0d",
             n_fill, n_ins, n_evict, n_js, n_jl, n_jlow, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
