// tb_ref_memory: writes random patterns to some addresses of a 16-entry
// ref_memory and checks read data and valid bits (clear after reset, set by
// writes) against a behavioural copy, with the one-clock read latency.
module tb_ref_memory;
  import ocr_pkg::*;
  localparam int N = 16, AW = 4;
  logic clk = 0, rst_n = 0, we = 0, rvalid;
  logic [AW-1:0] waddr = 0, raddr = 0;
  pattern_t wdata, rdata;
  pattern_t model [N];
  bit mvalid [N];
  int checks = 0, failures = 0;

  ref_memory #(.N_REF(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic pattern_t rand_pat();
    pattern_t p;
    for (int i = 0; i < $bits(pattern_t) / 16 + 1; i++) p = {p[$bits(pattern_t)-17:0], 16'($urandom)};
    return p;
  endfunction

  initial begin
    foreach (mvalid[i]) mvalid[i] = 0;
    wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) == 0);
      waddr = AW'($urandom); wdata = rand_pat();
      raddr = AW'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rvalid != mvalid[raddr] || (mvalid[raddr] && rdata != model[raddr])) begin
        failures++; $display("FAIL addr %0d valid %0d exp %0d", raddr, rvalid, mvalid[raddr]);
      end
      if (we) begin model[waddr] = wdata; mvalid[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
