// tb_frame_ram: random writes and reads of a small frame_ram, checked
// against a behavioural array, including the one-clock read latency and
// read-old-data on a same-address write.
module tb_frame_ram;
  localparam int DW = 8, DEPTH = 64, AW = 6;
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_ram #(.DW(DW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp;
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = DW'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      raddr = AW'($urandom); exp = model[raddr];
      we = $urandom_range(0, 1); waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom);
      wdata = DW'($urandom);
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("mismatch addr %0d got %0h exp %0h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
