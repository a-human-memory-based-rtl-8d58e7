// frame_ram: simple dual-port frame memory, one write port and one read port.
//
// Used for every frame buffer of the preprocessing chain (gray input frame,
// median-filtered frame, binary bitmap, label memory). The read is
// synchronous: rdata shows mem[raddr] one clock after raddr is presented,
// like an FPGA block RAM. A write and a read of the same address in the same
// clock return the old contents. The document names the bitmap and label
// memories; the port structure and latency are this design's choice.
module frame_ram #(
  parameter int DW    = 8,
  parameter int DEPTH = 131072,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
