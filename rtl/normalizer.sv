// normalizer: bilinear resize of one segmented character to 16x16 bits.
//
// For output sample (u = column, v = row) the source position inside the
// bounding box [x0,x1] x [y0,y1] is x = x0 + (u+0.5)*w/16 - 0.5 (w = x1-x0+1,
// likewise y), held with 8 fraction bits and clamped to the box. The four
// surrounding source pixels are read from the label memory, one per clock,
// and count as 1 when they carry the character's label. Their bilinear
// weights are summed and the output bit is 1 when the interpolated value is
// at least one half. Result bit v*16+u of img. Five clocks per output bit,
// 1280 per character; done pulses when img is complete.
// Normalizing to 16x16 by bilinear interpolation follows the document; the
// sample-position convention, the half threshold and the bit order are this
// design's choices.
module normalizer #(
  parameter int FRAME_H = 1024,
  parameter int W_MAX   = 128,
  parameter int LW      = 8,
  localparam int AW = $clog2(FRAME_H * W_MAX),
  localparam int RW = $clog2(FRAME_H),
  localparam int CW = $clog2(W_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] label,
  input  logic [CW-1:0] x0, x1,
  input  logic [RW-1:0] y0, y1,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] lab_raddr,
  input  logic [LW-1:0] lab_rdata,
  output ocr_pkg::img_t img
);
  logic       run;
  logic [3:0] u, v;
  logic [2:0] k;
  logic [2:0] p;          // neighbour hits 0..2 captured so far
  logic [LW-1:0] lab_q;
  int ix, ix1, iy, iy1, fx, fy;

  assign busy = run;

  // Source coordinate for one axis, 8 fraction bits, clamped to [lo, hi].
  function automatic int src_pos(input int lo, input int hi, input int idx);
    int pos;
    pos = lo * 256 + (2 * idx + 1) * (hi - lo + 1) * 8 - 128;
    if (pos < lo * 256) pos = lo * 256;
    if (pos > hi * 256) pos = hi * 256;
    return pos;
  endfunction

  always_comb begin
    int px, py;
    px  = src_pos(int'(x0), int'(x1), int'(u));
    py  = src_pos(int'(y0), int'(y1), int'(v));
    ix  = px / 256;  fx = px % 256;
    iy  = py / 256;  fy = py % 256;
    ix1 = (ix < int'(x1)) ? ix + 1 : ix;
    iy1 = (iy < int'(y1)) ? iy + 1 : iy;
    unique case (k)
      3'd0:    lab_raddr = AW'(ix  * FRAME_H + iy);
      3'd1:    lab_raddr = AW'(ix1 * FRAME_H + iy);
      3'd2:    lab_raddr = AW'(ix  * FRAME_H + iy1);
      default: lab_raddr = AW'(ix1 * FRAME_H + iy1);
    endcase
  end

  // Interpolated value of the four hits, weights (256-f) and f per axis.
  logic hit3, bit_out;
  always_comb begin
    int acc;
    hit3 = (lab_rdata == lab_q);
    acc = 0;
    if (p[0]) acc += (256 - fx) * (256 - fy);
    if (p[1]) acc += fx * (256 - fy);
    if (p[2]) acc += (256 - fx) * fy;
    if (hit3) acc += fx * fy;
    bit_out = (acc >= 32768);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; u <= '0; v <= '0; k <= '0; p <= '0; done <= 1'b0; lab_q <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1; u <= '0; v <= '0; k <= '0; lab_q <= label;
        end
      end else begin
        if (k >= 3'd1 && k <= 3'd3) p[k-1] <= (lab_rdata == lab_q);
        if (k == 3'd4) begin
          img[{v, u}] <= bit_out;
          k <= '0;
          u <= u + 1'b1;
          if (u == 4'd15) begin
            v <= v + 1'b1;
            if (v == 4'd15) begin run <= 1'b0; done <= 1'b1; end
          end
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end
endmodule
