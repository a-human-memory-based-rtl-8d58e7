// median_filter: 3x3 median filter for salt-and-pepper noise removal.
//
// A window_scan (R=1) reads the nine neighbours of every pixel of the source
// gray frame, one per clock. The first eight are shifted into registers; when
// the ninth arrives the median of the nine is formed by a compare-exchange
// sorting network and written to the destination frame at the centre
// address. One pixel every nine clocks; done pulses with the last write.
// Neighbours outside the frame repeat the nearest edge pixel. The 3x3 median
// follows the document; the sequential neighbour reads and the edge
// handling are this design's choices.
module median_filter #(
  parameter int FRAME_H = 1024,
  parameter int W_MAX   = 128,
  localparam int AW = $clog2(FRAME_H * W_MAX),
  localparam int CW = $clog2(W_MAX + 1)
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
  output logic [7:0]    dst_wdata
);
  logic tap_valid, tap_first, tap_center, tap_last, tap_inside;
  logic [7:0] hist [8];

  window_scan #(.FRAME_H(FRAME_H), .W_MAX(W_MAX), .R(1)) u_scan (
    .clk, .rst_n, .start, .width, .busy, .done,
    .rd_addr(src_raddr), .tap_valid, .tap_first, .tap_center, .tap_last, .tap_inside,
    .center_addr(dst_waddr)
  );

  function automatic logic [7:0] median9(input logic [7:0] v [9]);
    logic [7:0] s [9];
    s = v;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8 - i; j++)
        if (s[j] > s[j+1]) begin
          logic [7:0] t;
          t = s[j]; s[j] = s[j+1]; s[j+1] = t;
        end
    return s[4];
  endfunction

  always_ff @(posedge clk) begin
    if (tap_valid) begin
      hist[0] <= src_rdata;
      for (int i = 1; i < 8; i++) hist[i] <= hist[i-1];
    end
  end

  always_comb begin
    logic [7:0] v [9];
    for (int i = 0; i < 8; i++) v[i] = hist[i];
    v[8]      = src_rdata;
    dst_wdata = median9(v);
  end

  assign dst_we = tap_last;
endmodule
