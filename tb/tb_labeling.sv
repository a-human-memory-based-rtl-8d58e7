// tb_labeling: labels random and shaped 10x9 bitmaps and compares the label
// memory and the label count with a reference scan written here (previous
// pixel of the column plus three pixels of the previous column, smallest
// neighbour label, else a new label). Also checks that white pixels get 0,
// black pixels get a label, and the 2-clocks-per-pixel rate.
module tb_labeling;
  localparam int H = 10, WM = 9, W = 9, LW = 8, AW = $clog2(H*WM), CW = $clog2(WM+1);
  logic clk = 0, rst_n = 0, start = 0, busy, done, bit_rdata, lab_we;
  logic [CW-1:0] width = CW'(W);
  logic [LW-1:0] num_labels, lab_rdata, lab_wdata;
  logic [AW-1:0] bit_raddr, lab_raddr, lab_waddr;
  logic bits [H*WM];
  logic [LW-1:0] labs [H*WM];
  int checks = 0, failures = 0;

  labeling #(.FRAME_H(H), .W_MAX(WM), .LW(LW)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    bit_rdata <= bits[bit_raddr];
    lab_rdata <= labs[lab_raddr];
    if (lab_we) labs[lab_waddr] <= lab_wdata;
  end

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_one(input int density);
    int ref_lab [H*WM];
    int nl, cycles;
    for (int i = 0; i < H*WM; i++) bits[i] = ($urandom_range(0, 99) < density);
    // reference
    nl = 0;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        int best; best = 0;
        if (bits[c*H + r]) begin
          int nb [4];
          nb[0] = (r > 0) ? ref_lab[c*H + r - 1] : 0;
          nb[1] = (c > 0 && r > 0) ? ref_lab[(c-1)*H + r - 1] : 0;
          nb[2] = (c > 0) ? ref_lab[(c-1)*H + r] : 0;
          nb[3] = (c > 0 && r < H-1) ? ref_lab[(c-1)*H + r + 1] : 0;
          foreach (nb[i]) if (nb[i] != 0 && (best == 0 || nb[i] < best)) best = nb[i];
          if (best == 0) begin nl++; best = nl; end
        end
        ref_lab[c*H + r] = best;
      end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; #1; end
    @(posedge clk); #1;
    for (int i = 0; i < H*W; i++) begin
      checks++;
      if (int'(labs[i]) != ref_lab[i] || (bits[i] != (labs[i] != 0))) begin
        failures++; $display("FAIL pixel %0d got %0d exp %0d", i, labs[i], ref_lab[i]);
      end
    end
    checks++;
    if (int'(num_labels) != nl) begin failures++; $display("FAIL labels %0d exp %0d", num_labels, nl); end
    checks++;
    if (cycles < 2*H*W + W || cycles > 2*H*W + W + 3) begin failures++; $display("FAIL cycles %0d", cycles); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run_one(15); run_one(35); run_one(60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
