// segmentation: extracts one character per label from the label memory.
//
// For each label L = 1 .. num_labels the whole label frame is scanned once
// (one read per clock, pipelined through the one-clock read latency) and the
// bounding box (x = column, y = row) and pixel count of label L are
// gathered. If the label has at least MIN_PIX pixels, the segment is offered
// on seg_valid with its label and box and held until seg_ack; smaller
// components are skipped as specks. done pulses after the last label.
// Scanning the frame once per label follows the document; the bounding-box
// output, MIN_PIX and the valid/ack handshake are this design's choices.
// Timing: width*FRAME_H + 3 clocks per label, plus the wait for seg_ack.
module segmentation #(
  parameter int FRAME_H = 1024,
  parameter int W_MAX   = 128,
  parameter int LW      = 8,
  parameter int MIN_PIX = 4,
  localparam int AW = $clog2(FRAME_H * W_MAX),
  localparam int RW = $clog2(FRAME_H),
  localparam int CW = $clog2(W_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] width,
  input  logic [LW-1:0] num_labels,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] lab_raddr,
  input  logic [LW-1:0] lab_rdata,
  output logic          seg_valid,
  input  logic          seg_ack,
  output logic [LW-1:0] seg_label,
  output logic [CW-1:0] seg_x0, seg_x1,
  output logic [RW-1:0] seg_y0, seg_y1,
  output logic [AW:0]   seg_count
);
  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_DRAIN, S_CHECK, S_OFFER} state_t;
  state_t        state;
  logic [RW-1:0] r, p_r;
  logic [CW-1:0] c, p_c;
  logic          p_valid;

  assign busy      = (state != S_IDLE);
  assign lab_raddr = AW'(int'(c) * FRAME_H + int'(r));
  assign seg_valid = (state == S_OFFER);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; r <= '0; c <= '0; p_valid <= 1'b0; p_r <= '0; p_c <= '0;
      seg_label <= '0; seg_count <= '0; done <= 1'b0;
      seg_x0 <= '0; seg_x1 <= '0; seg_y0 <= '0; seg_y1 <= '0;
    end else begin
      done    <= 1'b0;
      p_valid <= (state == S_SCAN);
      p_r     <= r;
      p_c     <= c;
      // Bounding-box accumulation on the data returned for the previous address.
      if (p_valid && lab_rdata == seg_label) begin
        seg_count <= seg_count + 1'b1;
        if (seg_count == '0) begin
          seg_x0 <= p_c; seg_x1 <= p_c; seg_y0 <= p_r; seg_y1 <= p_r;
        end else begin
          if (p_c < seg_x0) seg_x0 <= p_c;
          if (p_c > seg_x1) seg_x1 <= p_c;
          if (p_r < seg_y0) seg_y0 <= p_r;
          if (p_r > seg_y1) seg_y1 <= p_r;
        end
      end
      unique case (state)
        S_IDLE: if (start) begin
          if (num_labels == '0 || width == '0) done <= 1'b1;
          else begin
            seg_label <= LW'(1); seg_count <= '0; r <= '0; c <= '0;
            state <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (r != RW'(FRAME_H - 1)) r <= r + 1'b1;
          else begin
            r <= '0;
            if (c == width - 1'b1) begin c <= '0; state <= S_DRAIN; end
            else c <= c + 1'b1;
          end
        end
        S_DRAIN: state <= S_CHECK;
        S_CHECK: begin
          if (seg_count >= (AW+1)'(MIN_PIX)) state <= S_OFFER;
          else if (seg_label == num_labels) begin state <= S_IDLE; done <= 1'b1; end
          else begin seg_label <= seg_label + 1'b1; seg_count <= '0; state <= S_SCAN; end
        end
        S_OFFER: if (seg_ack) begin
          if (seg_label == num_labels) begin state <= S_IDLE; done <= 1'b1; end
          else begin seg_label <= seg_label + 1'b1; seg_count <= '0; state <= S_SCAN; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
