// ocr_top: on-line learning character recognizer, from sensor pixels to
// learned reference patterns.
//
// Data path, one word frame at a time:
//   frame_capture  -> gray frame RAM   (columns from the line-scan sensor)
//   median_filter  -> filtered RAM     (3x3 median)
//   binarizer      -> bitmap RAM       (local mean threshold)
//   labeling       -> label RAM        (connected components)
//   segmentation   -> one bounding box per label, then for each character:
//   normalizer     -> 16x16 image, feature_extract -> moment features,
//   learning_unit  -> nearest-match classification, ranking, optimization.
// A small sequencer starts each stage when the previous one is done and
// shares the label RAM read port between labeling, segmentation and the
// normalizer. For every character one res_valid pulse reports the learning
// result with the character's label, bounding box, image and features;
// frame_done pulses when the last character of the frame is finished, and
// the capture then accepts the next word. All stages run on one clock.
// The chain of stages follows the document; the frame-at-a-time hand-over and
// the sequencer are this design's choices.
module ocr_top
  import ocr_pkg::*;
#(
  parameter int FRAME_H  = 1024,
  parameter int W_MAX    = 128,
  parameter int SPACE_COLS = 8,
  parameter int LW       = 8,
  parameter int BIN_R    = 2,
  parameter int N_REF    = 512,
  parameter int S_POS    = 256,
  parameter int NTH      = 8,
  parameter int C        = 16,
  localparam int AW = $clog2(FRAME_H * W_MAX),
  localparam int RW = $clog2(FRAME_H),
  localparam int CW = $clog2(W_MAX + 1),
  localparam int NW = $clog2(N_REF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  logic [7:0]    pix,
  output logic          pix_ready,
  output logic          res_valid,
  output learn_result_t res,
  output logic [LW-1:0] res_label,
  output logic [CW-1:0] res_x0, res_x1,
  output logic [RW-1:0] res_y0, res_y1,
  output pattern_t      res_pat,
  output logic          frame_done,
  output logic [NW-1:0] ref_count
);
  typedef enum logic [3:0] {
    S_IDLE, S_MED, S_BIN, S_LAB, S_SEG_GO, S_SEG, S_NORM, S_FEAT, S_LEARN, S_ACK, S_END
  } state_t;
  state_t state;

  // frame capture and gray RAM
  logic          cap_we, frame_valid;
  logic [AW-1:0] cap_waddr;
  logic [7:0]    cap_wdata;
  logic [CW-1:0] width;

  logic [AW-1:0] g0_raddr, g1_raddr, g1_waddr, bit_raddr, bit_waddr;
  logic [7:0]    g0_rdata, g1_rdata, g1_wdata;
  logic          g1_we, bit_we, bit_wdata, bit_rdata;

  logic          med_done, med_busy, bin_done, bin_busy;
  logic          lab_done, lab_busy, lab_we;
  logic [AW-1:0] lab_waddr, lab_raddr, lab_raddr_l, lab_raddr_s, lab_raddr_n;
  logic [LW-1:0] lab_wdata, lab_rdata, num_labels;

  logic          seg_done, seg_busy, seg_valid;
  logic [LW-1:0] seg_label;
  logic [CW-1:0] seg_x0, seg_x1;
  logic [RW-1:0] seg_y0, seg_y1;
  logic [AW:0]   seg_count;
  logic          seg_fin;

  logic          nrm_done, nrm_busy, fx_done, fx_busy;
  img_t          nimg;
  feat_t         nfeat;

  logic          lu_ready, lu_valid, lu_res_valid;
  learn_result_t lu_res;

  frame_capture #(.FRAME_H(FRAME_H), .W_MAX(W_MAX), .SPACE_COLS(SPACE_COLS)) u_cap (
    .clk, .rst_n, .pix_valid, .pix, .pix_ready,
    .wr_en(cap_we), .wr_addr(cap_waddr), .wr_data(cap_wdata),
    .frame_valid, .frame_width(width), .frame_release(state == S_END)
  );

  frame_ram #(.DW(8), .DEPTH(FRAME_H * W_MAX)) u_gray0 (
    .clk, .we(cap_we), .waddr(cap_waddr), .wdata(cap_wdata), .raddr(g0_raddr), .rdata(g0_rdata));

  median_filter #(.FRAME_H(FRAME_H), .W_MAX(W_MAX)) u_med (
    .clk, .rst_n, .start(state == S_IDLE && frame_valid), .width, .busy(med_busy), .done(med_done),
    .src_raddr(g0_raddr), .src_rdata(g0_rdata),
    .dst_we(g1_we), .dst_waddr(g1_waddr), .dst_wdata(g1_wdata));

  frame_ram #(.DW(8), .DEPTH(FRAME_H * W_MAX)) u_gray1 (
    .clk, .we(g1_we), .waddr(g1_waddr), .wdata(g1_wdata), .raddr(g1_raddr), .rdata(g1_rdata));

  binarizer #(.FRAME_H(FRAME_H), .W_MAX(W_MAX), .R(BIN_R)) u_bin (
    .clk, .rst_n, .start(state == S_MED && med_done), .width, .busy(bin_busy), .done(bin_done),
    .src_raddr(g1_raddr), .src_rdata(g1_rdata),
    .dst_we(bit_we), .dst_waddr(bit_waddr), .dst_wdata(bit_wdata));

  frame_ram #(.DW(1), .DEPTH(FRAME_H * W_MAX)) u_bits (
    .clk, .we(bit_we), .waddr(bit_waddr), .wdata(bit_wdata), .raddr(bit_raddr), .rdata(bit_rdata));

  labeling #(.FRAME_H(FRAME_H), .W_MAX(W_MAX), .LW(LW)) u_lab (
    .clk, .rst_n, .start(state == S_BIN && bin_done), .width, .busy(lab_busy), .done(lab_done),
    .num_labels, .bit_raddr, .bit_rdata,
    .lab_raddr(lab_raddr_l), .lab_rdata, .lab_we, .lab_waddr, .lab_wdata);

  always_comb begin
    unique case (state)
      S_LAB:   lab_raddr = lab_raddr_l;
      S_NORM:  lab_raddr = lab_raddr_n;
      default: lab_raddr = lab_raddr_s;
    endcase
  end

  frame_ram #(.DW(LW), .DEPTH(FRAME_H * W_MAX)) u_labels (
    .clk, .we(lab_we), .waddr(lab_waddr), .wdata(lab_wdata), .raddr(lab_raddr), .rdata(lab_rdata));

  segmentation #(.FRAME_H(FRAME_H), .W_MAX(W_MAX), .LW(LW)) u_seg (
    .clk, .rst_n, .start(state == S_SEG_GO), .width, .num_labels, .busy(seg_busy), .done(seg_done),
    .lab_raddr(lab_raddr_s), .lab_rdata, .seg_valid, .seg_ack(state == S_ACK),
    .seg_label, .seg_x0, .seg_x1, .seg_y0, .seg_y1, .seg_count);

  normalizer #(.FRAME_H(FRAME_H), .W_MAX(W_MAX), .LW(LW)) u_norm (
    .clk, .rst_n, .start(state == S_SEG && seg_valid), .label(seg_label),
    .x0(seg_x0), .x1(seg_x1), .y0(seg_y0), .y1(seg_y1), .busy(nrm_busy), .done(nrm_done),
    .lab_raddr(lab_raddr_n), .lab_rdata, .img(nimg));

  feature_extract u_feat (
    .clk, .rst_n, .start(state == S_NORM && nrm_done), .img(nimg), .busy(fx_busy), .done(fx_done),
    .feat(nfeat));

  assign lu_valid = (state == S_FEAT) && fx_done;

  learning_unit #(.N_REF(N_REF), .S_POS(S_POS), .NTH(NTH), .C(C)) u_learn (
    .clk, .rst_n, .in_valid(lu_valid), .in_ready(lu_ready), .in_pat('{img: nimg, feat: nfeat}),
    .res_valid(lu_res_valid), .res(lu_res), .ref_count);


  // Sequencer. seg_fin remembers that segmentation has reported done.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; seg_fin <= 1'b0; res_valid <= 1'b0; res <= '0; frame_done <= 1'b0;
      res_label <= '0; res_x0 <= '0; res_x1 <= '0; res_y0 <= '0; res_y1 <= '0; res_pat <= '0;
    end else begin
      res_valid  <= 1'b0;
      frame_done <= 1'b0;
      if (seg_done) seg_fin <= 1'b1;
      unique case (state)
        S_IDLE:   if (frame_valid) state <= S_MED;
        S_MED:    if (med_done) state <= S_BIN;
        S_BIN:    if (bin_done) state <= S_LAB;
        S_LAB:    if (lab_done) begin state <= S_SEG_GO; seg_fin <= 1'b0; end
        S_SEG_GO: state <= S_SEG;
        S_SEG: begin
          if (seg_valid)                      state <= S_NORM;
          else if (seg_fin || seg_done)       state <= S_END;
        end
        S_NORM:   if (nrm_done) state <= S_FEAT;
        S_FEAT:   if (fx_done)  state <= S_LEARN;
        S_LEARN:  if (lu_res_valid) begin
          res_valid <= 1'b1; res <= lu_res; res_label <= seg_label;
          res_x0 <= seg_x0; res_x1 <= seg_x1; res_y0 <= seg_y0; res_y1 <= seg_y1;
          res_pat <= '{img: nimg, feat: nfeat};
          state <= S_ACK;
        end
        S_ACK:    state <= S_SEG;
        S_END:    begin frame_done <= 1'b1; state <= S_IDLE; end
        default:  state <= S_IDLE;
      endcase
    end
  end
endmodule
