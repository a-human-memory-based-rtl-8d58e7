// feature_extract: moment features of a normalized 16x16 character.
//
// After start, the 256 pixels are visited one per clock (bit v*16+u is
// row v = y, column u = x) and the raw moments m = sum 1, sx, sy, sxx, syy
// and sxy are accumulated. Five clocks of division by m, through one shared
// divider, then give the feature vector, all 8-bit unsigned:
//   feat[0] total mass m (saturated at 255)
//   feat[1] centroid x, 4.4 fixed point      feat[2] centroid y, 4.4
//   feat[3] variance in x, 4.4 (clamped)     feat[4] variance in y, 4.4
//   feat[5] covariance xy, 4.4 plus 128 (clamped to 0..255)
// An empty image gives all zeros. done pulses 262 clocks after start.
// Mass and centroid are features the document lists; the second central
// moments stand in for its elliptical features. Eccentricity, orientation and
// skewness are not computed, and the encodings are this design's choices.
module feature_extract (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  ocr_pkg::img_t  img,
  output logic           busy,
  output logic           done,
  output ocr_pkg::feat_t feat
);
  typedef enum logic [1:0] {S_IDLE, S_ACC, S_DIV} state_t;
  state_t      state;
  logic [7:0]  idx;
  logic [2:0]  step;
  logic [8:0]  m;
  logic [11:0] sx, sy;
  logic [15:0] sxx, syy, sxy;
  logic [7:0]  cx, cy;               // 4.4
  logic [11:0] ex2, ey2;             // 4.4 second raw moments
  logic [19:0] num, quo;
  logic [3:0]  x, y;

  assign busy = (state != S_IDLE);
  assign x = idx[3:0];
  assign y = idx[7:4];

  always_comb begin
    unique case (step)
      3'd0:    num = 20'(sx)  << 4;
      3'd1:    num = 20'(sy)  << 4;
      3'd2:    num = 20'(sxx) << 4;
      3'd3:    num = 20'(syy) << 4;
      default: num = 20'(sxy) << 4;
    endcase
    quo = (m == '0) ? '0 : num / 20'(m);
  end

  function automatic logic [7:0] clamp8(input int v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return 8'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; step <= '0; done <= 1'b0; feat <= '0;
      m <= '0; sx <= '0; sy <= '0; sxx <= '0; syy <= '0; sxy <= '0;
      cx <= '0; cy <= '0; ex2 <= '0; ey2 <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ACC; idx <= '0;
          m <= '0; sx <= '0; sy <= '0; sxx <= '0; syy <= '0; sxy <= '0;
        end
        S_ACC: begin
          if (img[idx]) begin
            m   <= m + 1'b1;
            sx  <= sx + 12'(x);
            sy  <= sy + 12'(y);
            sxx <= sxx + 16'(x) * 16'(x);
            syy <= syy + 16'(y) * 16'(y);
            sxy <= sxy + 16'(x) * 16'(y);
          end
          idx <= idx + 1'b1;
          if (idx == 8'd255) begin state <= S_DIV; step <= '0; end
        end
        S_DIV: begin
          unique case (step)
            3'd0: cx  <= quo[7:0];
            3'd1: cy  <= quo[7:0];
            3'd2: ex2 <= quo[11:0];
            3'd3: ey2 <= quo[11:0];
            default: ;
          endcase
          step <= step + 1'b1;
          if (step == 3'd4) begin
            state   <= S_IDLE;
            done    <= 1'b1;
            if (m == '0) feat <= '0;
            else begin
              feat[0] <= (m > 9'd255) ? 8'd255 : m[7:0];
              feat[1] <= cx;
              feat[2] <= cy;
              feat[3] <= clamp8(int'(ex2) - (int'(cx) * int'(cx)) / 16);
              feat[4] <= clamp8(int'(ey2) - (int'(cy) * int'(cy)) / 16);
              feat[5] <= clamp8(int'(quo[11:0]) - (int'(cx) * int'(cy)) / 16 + 128);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
