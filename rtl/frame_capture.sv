// frame_capture: assembles a word frame from the line-scan sensor stream.
//
// The sensor delivers one column of FRAME_H gray pixels after another
// (column-major, row 0 first). Each accepted pixel is written to the frame
// memory at address col*FRAME_H + row. A column with no pixel darker than
// INK_LEVEL is a blank column. Before the first ink, blank columns are
// dropped except one, kept as a margin in column 0, so that the filters see
// paper on the left of the first stroke. Blank columns between letters are
// kept; a run of SPACE_COLS blank columns is a word space and closes the
// word frame, whose width then ends one blank margin column after the last
// ink column. Reaching W_MAX columns also closes the frame (without right
// margin). The frame is then held (frame_valid=1, pix_ready=0) until
// frame_release. Collecting the columns between two word spaces follows the
// document; the blank-column rule, the margins, INK_LEVEL, SPACE_COLS and
// W_MAX are this design's choices.
//
// Timing: one pixel per clock when pix_valid && pix_ready; frame_valid rises
// the clock after the closing column's last pixel.
module frame_capture #(
  parameter int         FRAME_H   = 1024,
  parameter int         W_MAX     = 128,
  parameter logic [7:0] INK_LEVEL = 8'd128,
  parameter int         SPACE_COLS = 8,
  localparam int AW = $clog2(FRAME_H * W_MAX),
  localparam int RW = $clog2(FRAME_H),
  localparam int CW = $clog2(W_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  logic [7:0]    pix,
  output logic          pix_ready,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [7:0]    wr_data,
  output logic          frame_valid,
  output logic [CW-1:0] frame_width,
  input  logic          frame_release
);
  logic [RW-1:0] row;
  logic [CW-1:0] col, last_ink, blank_run;
  logic          col_ink, seen_ink, margin;
  logic          accept, ink_now;

  assign pix_ready = !frame_valid;
  assign accept    = pix_valid && pix_ready;
  assign ink_now   = col_ink || (pix < INK_LEVEL);
  assign wr_en     = accept;
  assign wr_addr   = AW'(col) * AW'(FRAME_H) + AW'(row);
  assign wr_data   = pix;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row <= '0; col <= '0; col_ink <= 1'b0; seen_ink <= 1'b0; margin <= 1'b0;
      last_ink <= '0; blank_run <= '0;
      frame_valid <= 1'b0; frame_width <= '0;
    end else begin
      if (frame_valid && frame_release) frame_valid <= 1'b0;
      if (accept) begin
        if (row == RW'(FRAME_H - 1)) begin
          row     <= '0;
          col_ink <= 1'b0;
          if (ink_now) begin
            last_ink  <= col;
            blank_run <= '0;
            seen_ink  <= 1'b1;
            if (col == CW'(W_MAX - 1)) begin
              frame_valid <= 1'b1; frame_width <= CW'(W_MAX);
              col <= '0; seen_ink <= 1'b0; margin <= 1'b0;
            end else begin
              col <= col + 1'b1;
            end
          end else if (!seen_ink) begin
            // blank before the word: keep the first one as the left margin
            margin <= 1'b1;
            col    <= CW'(1);
          end else begin
            blank_run <= blank_run + 1'b1;
            if (int'(blank_run) + 1 >= SPACE_COLS || col == CW'(W_MAX - 1)) begin
              frame_valid <= 1'b1; frame_width <= last_ink + CW'(2);
              col <= '0; seen_ink <= 1'b0; margin <= 1'b0; blank_run <= '0;
            end else begin
              col <= col + 1'b1;
            end
          end
        end else begin
          row     <= row + 1'b1;
          col_ink <= ink_now;
        end
      end
    end
  end
endmodule
