// labeling: single-pass connected-component labeling of the binary bitmap.
//
// Pixels are visited column by column, row 0 first. Four registers hold the
// labels of the pixel's already-visited neighbours: n (previous row, same
// column), and nw, w, sw (rows r-1, r, r+1 of the previous column), so the
// components are 8-connected. A black pixel takes the smallest non-zero
// neighbour label, or a new label when it has none; a white pixel gets 0.
// Labels are written to the label memory, whose read port also supplies the
// previous column's labels (one read of row r+1 per pixel slides the
// nw/w/sw window). Label equivalences are not merged: a component whose
// branches meet late can carry two labels. 2 clocks per pixel plus one per
// column; done pulses when the frame is finished and num_labels is valid.
// New labels stop at 2^LW-1; later new components stay 0.
// The four neighbour registers follow the document; the scan order,
// minimum-label rule and missing merge are this design's choices.
module labeling #(
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
  input  logic [CW-1:0] width,
  output logic          busy,
  output logic          done,
  output logic [LW-1:0] num_labels,
  output logic [AW-1:0] bit_raddr,
  input  logic          bit_rdata,
  output logic [AW-1:0] lab_raddr,
  input  logic [LW-1:0] lab_rdata,
  output logic          lab_we,
  output logic [AW-1:0] lab_waddr,
  output logic [LW-1:0] lab_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_RD, S_WR} state_t;
  state_t        state;
  logic [RW-1:0] r;
  logic [CW-1:0] c;
  logic          first;
  logic [LW-1:0] nw, w, n;
  logic [LW:0]   next_label;
  logic [LW-1:0] sw, cur, best;
  logic          any;

  assign busy = (state != S_IDLE);

  // Read addresses: the bit of (c,r) and the label of (c-1, r+1); in S_PRE
  // the label of (c-1, 0).
  always_comb begin
    bit_raddr = AW'(int'(c) * FRAME_H + int'(r));
    if (state == S_PRE) lab_raddr = AW'((int'(c) - 1) * FRAME_H);
    else                lab_raddr = AW'((int'(c) - 1) * FRAME_H + int'(r) + 1);
  end

  // Neighbour decision in S_WR, when both reads have returned.
  always_comb begin
    logic [LW-1:0] cand [4];
    sw = (c != 0 && r != RW'(FRAME_H - 1)) ? lab_rdata : '0;
    cand[0] = nw; cand[1] = w; cand[2] = sw; cand[3] = n;
    any  = 1'b0;
    best = '1;
    for (int i = 0; i < 4; i++)
      if (cand[i] != '0) begin
        any = 1'b1;
        if (cand[i] < best) best = cand[i];
      end
    if (!bit_rdata)                        cur = '0;
    else if (any)                          cur = best;
    else if (next_label < (LW+1)'(2**LW))  cur = next_label[LW-1:0];
    else                                   cur = '0;
  end

  assign lab_we    = (state == S_WR);
  assign lab_waddr = bit_raddr;
  assign lab_wdata = cur;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; r <= '0; c <= '0; first <= 1'b0;
      nw <= '0; w <= '0; n <= '0; next_label <= (LW+1)'(1);
      done <= 1'b0; num_labels <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start && width != '0) begin
          state <= S_PRE; r <= '0; c <= '0; next_label <= (LW+1)'(1);
        end
        S_PRE: begin
          nw <= '0; n <= '0; first <= 1'b1;
          state <= S_RD;
        end
        S_RD: begin
          if (first) w <= (c != 0) ? lab_rdata : '0;
          first <= 1'b0;
          state <= S_WR;
        end
        S_WR: begin
          nw <= w; w <= sw; n <= cur;
          if (bit_rdata && !any && next_label < (LW+1)'(2**LW))
            next_label <= next_label + 1'b1;
          if (r != RW'(FRAME_H - 1)) begin
            r <= r + 1'b1; state <= S_RD;
          end else begin
            r <= '0;
            if (c == width - 1'b1) begin
              state <= S_IDLE; done <= 1'b1;
              num_labels <= (bit_rdata && !any && next_label < (LW+1)'(2**LW))
                            ? next_label[LW-1:0] : LW'(next_label - 1'b1);
            end else begin
              c <= c + 1'b1; state <= S_PRE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
