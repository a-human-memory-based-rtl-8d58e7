// window_scan: neighbourhood read sequencer for the frame filters.
//
// After a start pulse it visits every pixel of a frame of FRAME_H rows and
// `width` columns (column by column, row 0 first) and, for each, issues one
// frame-memory read per clock for every pixel of its (2R+1)x(2R+1)
// neighbourhood, column offset outer, row offset inner. Coordinates outside
// the frame are clamped to the nearest edge pixel. The tap_* strobes are
// delayed by the one-clock read latency, so they line up with the memory's
// rdata: tap_first marks the first neighbour, tap_center the pixel itself,
// tap_last the final neighbour, tap_inside that the neighbour lies inside
// the frame (its address was not clamped), and center_addr the address to
// write the filtered result to. done pulses together with the last tap of the frame.
// One read per clock, (2R+1)^2 clocks per pixel. The edge clamping and the
// read order are this design's choices.
module window_scan #(
  parameter int FRAME_H = 1024,
  parameter int W_MAX   = 128,
  parameter int R       = 1,
  localparam int AW = $clog2(FRAME_H * W_MAX),
  localparam int RW = $clog2(FRAME_H),
  localparam int CW = $clog2(W_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] width,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] rd_addr,
  output logic          tap_valid,
  output logic          tap_first,
  output logic          tap_center,
  output logic          tap_last,
  output logic          tap_inside,
  output logic [AW-1:0] center_addr
);
  logic [RW-1:0] r;
  logic [CW-1:0] c;
  int            dx, dy;
  logic          run, win_end, frame_end, in_frame;

  assign busy      = run;
  assign win_end   = (dx == R) && (dy == R);
  assign frame_end = win_end && (r == RW'(FRAME_H - 1)) && (c == width - 1'b1);

  always_comb begin
    int sr, sc;
    sr = int'(r) + dy;
    sc = int'(c) + dx;
    in_frame = (sr >= 0) && (sr <= FRAME_H - 1) && (sc >= 0) && (sc <= int'(width) - 1);
    if (sr < 0) sr = 0;
    if (sr > FRAME_H - 1) sr = FRAME_H - 1;
    if (sc < 0) sc = 0;
    if (sc > int'(width) - 1) sc = int'(width) - 1;
    rd_addr = AW'(sc * FRAME_H + sr);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; r <= '0; c <= '0; dx <= -R; dy <= -R;
      tap_valid <= 1'b0; tap_first <= 1'b0; tap_center <= 1'b0; tap_last <= 1'b0;
      tap_inside <= 1'b0;
      done <= 1'b0; center_addr <= '0;
    end else begin
      tap_valid   <= run;
      tap_first   <= run && (dx == -R) && (dy == -R);
      tap_center  <= run && (dx == 0) && (dy == 0);
      tap_last    <= run && win_end;
      tap_inside  <= in_frame;
      center_addr <= AW'(int'(c) * FRAME_H + int'(r));
      done        <= run && frame_end;
      if (!run) begin
        if (start && width != '0) begin
          run <= 1'b1; r <= '0; c <= '0; dx <= -R; dy <= -R;
        end
      end else if (dy != R) begin
        dy <= dy + 1;
      end else begin
        dy <= -R;
        if (dx != R) begin
          dx <= dx + 1;
        end else begin
          dx <= -R;
          if (r != RW'(FRAME_H - 1)) begin
            r <= r + 1'b1;
          end else begin
            r <= '0;
            if (c == width - 1'b1) run <= 1'b0;
            else                   c <= c + 1'b1;
          end
        end
      end
    end
  end
endmodule
