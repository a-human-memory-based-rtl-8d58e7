// binarizer: local-threshold binarization by a mean filter.
//
// A window_scan reads the (2R+1)x(2R+1) neighbourhood of every pixel of the
// filtered gray frame and sums it. When the last neighbour arrives the pixel
// is written to the bitmap as 1 (black) if it is darker than the window mean
// by more than OFFSET, i.e. (pixel + OFFSET) * (2R+1)^2 < sum, else 0.
// Window pixels outside the frame repeat the nearest edge pixel.
// (2R+1)^2 clocks per pixel; done pulses with the last write. The local
// threshold from a mean filter follows the document; the 5x5 window, the
// offset, the edge handling and the comparison form are this design's
// choices. Strokes wider
// than about half the window lose their interior.
module binarizer #(
  parameter int FRAME_H = 1024,
  parameter int W_MAX   = 128,
  parameter int R       = 2,
  parameter int OFFSET  = 8,
  localparam int AW = $clog2(FRAME_H * W_MAX),
  localparam int CW = $clog2(W_MAX + 1),
  localparam int NWIN = (2*R+1) * (2*R+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] width,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] src_raddr,
  input  logic [7:0]    src_rdata,
  output logic          dst_we,
  output logic [AW-1:0] dst_waddr,
  output logic          dst_wdata
);
  logic tap_valid, tap_first, tap_center, tap_last, tap_inside;
  logic [19:0] sum;
  logic [7:0]  center;
  logic [19:0] total;

  window_scan #(.FRAME_H(FRAME_H), .W_MAX(W_MAX), .R(R)) u_scan (
    .clk, .rst_n, .start, .width, .busy, .done,
    .rd_addr(src_raddr), .tap_valid, .tap_first, .tap_center, .tap_last, .tap_inside,
    .center_addr(dst_waddr)
  );

  always_ff @(posedge clk) begin
    if (tap_valid) sum <= tap_first ? 20'(src_rdata) : sum + 20'(src_rdata);
    if (tap_center) center <= src_rdata;
  end

  assign total     = sum + 20'(src_rdata);
  assign dst_we    = tap_last;
  assign dst_wdata = ((20'(center) + 20'(OFFSET)) * 20'(NWIN)) < total;
endmodule
