// ref_memory: reference pattern memory of the learning system.
//
// N_REF entries, each a pattern (16x16 image plus feature vector) and a valid
// bit. One write port (new or renewed reference patterns, from the
// optimization unit) and one synchronous read port (the nearest-match
// search): rdata and rvalid show entry raddr one clock after raddr. Valid
// bits are cleared by reset and set by writes; an address is never freed,
// only overwritten. The memory is the document's "Ref. patterns memory"; its
// size and port structure are this design's choices.
module ref_memory #(
  parameter int N_REF = 512,
  localparam int AW = $clog2(N_REF)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  ocr_pkg::pattern_t wdata,
  input  logic [AW-1:0]     raddr,
  output ocr_pkg::pattern_t rdata,
  output logic              rvalid
);
  ocr_pkg::pattern_t mem [N_REF];
  logic [N_REF-1:0]  valid;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid  <= '0;
      rvalid <= 1'b0;
    end else begin
      if (we) valid[waddr] <= 1'b1;
      rvalid <= valid[raddr];
    end
  end
endmodule
