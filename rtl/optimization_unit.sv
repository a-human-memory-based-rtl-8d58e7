// optimization_unit: keeps reference patterns and distance thresholds tuned.
//
// Per reference address it holds the distance threshold D_th and the running
// means used to renew the reference: a counter of assigned inputs, per-pixel
// counts of black pixels and per-feature sums (Ref_mean), and a sum of the
// winner-input distances (D_th_mean). Means are kept as sums and divided by
// the counter only when they are used.
//
// op_new=1: the input becomes the reference at op_addr. It is written to the
// reference memory, D_th is set to DTH_INIT and the means restart from the
// input with counter 1 (distance sum DTH_INIT/2, so the threshold the means
// give equals DTH_INIT). 2 clocks.
// op_new=0: the input was matched to the reference at op_addr with distance
// op_dist. The input is added to the sums and the counter incremented. When
// the counter exceeds NTH, the reference becomes the mean (pixel majority,
// feature averages), D_th becomes twice the mean distance clamped to
// [DTH_MIN, DTH_MAX], both are written back, op_updated is set and the means
// restart from the new reference with counter 1. 3 clocks.
// op_done pulses after the last write. dth_raddr/dth_rdata is a
// combinational read port for the threshold comparison.
// The per-reference D_th, the mean memories, the counter and the renewal
// after N_th inputs follow the document; how the means are formed, the
// factor two, the clamping and all numeric defaults are this design's
// choices.
module optimization_unit
  import ocr_pkg::*;
#(
  parameter int N_REF    = 512,
  parameter int NTH      = 8,
  parameter int DTH_INIT = 96,
  parameter int DTH_MIN  = 16,
  parameter int DTH_MAX  = 384,
  localparam int AW   = $clog2(N_REF),
  localparam int CNTW = $clog2(NTH + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          op_valid,
  input  logic          op_new,
  input  logic [AW-1:0] op_addr,
  input  pattern_t      op_pat,
  input  dist_t         op_dist,
  output logic          op_done,
  output logic          op_updated,
  output logic          ref_we,
  output logic [AW-1:0] ref_waddr,
  output pattern_t      ref_wdata,
  input  logic [AW-1:0] dth_raddr,
  output dist_t         dth_rdata
);
  typedef struct packed {
    logic [CNTW-1:0]                     cnt;
    logic [DIST_W+CNTW-1:0]              dsum;
    logic [FEAT_N-1:0][FEAT_W+CNTW-1:0]  fsum;
    logic [IMG_BITS-1:0][CNTW-1:0]       pcnt;
  } acc_t;

  typedef enum logic [1:0] {S_IDLE, S_NEW, S_RD, S_UPD} state_t;
  state_t        state;
  logic [AW-1:0] a;
  pattern_t      pat_q;
  dist_t         dist_q;
  acc_t          acc_mem [N_REF];
  acc_t          acc_q, acc_nx, acc_init_new, acc_init_upd;
  dist_t         dth [N_REF];
  pattern_t      mean_pat;
  dist_t         dth_new;
  logic          renew;

  assign dth_rdata = dth[dth_raddr];
  assign ref_waddr = a;

  // Means restart from a pattern p and threshold t with counter 1.
  function automatic acc_t acc_start(input pattern_t p, input int t);
    acc_t r;
    r.cnt  = CNTW'(1);
    r.dsum = (DIST_W+CNTW)'(t / 2);
    for (int k = 0; k < FEAT_N; k++)   r.fsum[k] = (FEAT_W+CNTW)'(p.feat[k]);
    for (int i = 0; i < IMG_BITS; i++) r.pcnt[i] = CNTW'(p.img[i]);
    return r;
  endfunction

  always_comb begin
    int d;
    acc_nx.cnt  = acc_q.cnt + 1'b1;
    acc_nx.dsum = acc_q.dsum + (DIST_W+CNTW)'(dist_q);
    for (int k = 0; k < FEAT_N; k++)
      acc_nx.fsum[k] = acc_q.fsum[k] + (FEAT_W+CNTW)'(pat_q.feat[k]);
    for (int i = 0; i < IMG_BITS; i++)
      acc_nx.pcnt[i] = acc_q.pcnt[i] + CNTW'(pat_q.img[i]);
    renew = int'(acc_nx.cnt) > NTH;
    for (int i = 0; i < IMG_BITS; i++)
      mean_pat.img[i] = (2 * int'(acc_nx.pcnt[i])) >= int'(acc_nx.cnt);
    for (int k = 0; k < FEAT_N; k++)
      mean_pat.feat[k] = FEAT_W'(int'(acc_nx.fsum[k]) / int'(acc_nx.cnt));
    d = (2 * int'(acc_nx.dsum)) / int'(acc_nx.cnt);
    if (d < DTH_MIN) d = DTH_MIN;
    if (d > DTH_MAX) d = DTH_MAX;
    dth_new      = DIST_W'(d);
    acc_init_new = acc_start(pat_q, DTH_INIT);
    acc_init_upd = acc_start(mean_pat, d);
  end

  assign ref_we    = (state == S_NEW) || (state == S_UPD && renew);
  assign ref_wdata = (state == S_NEW) ? pat_q : mean_pat;

  always_ff @(posedge clk) begin
    if (state == S_NEW) begin
      acc_mem[a] <= acc_init_new;
      dth[a]     <= DIST_W'(DTH_INIT);
    end else if (state == S_UPD) begin
      acc_mem[a] <= renew ? acc_init_upd : acc_nx;
      if (renew) dth[a] <= dth_new;
    end
    if (state == S_RD) acc_q <= acc_mem[a];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; a <= '0; pat_q <= '0; dist_q <= '0;
      op_done <= 1'b0; op_updated <= 1'b0;
    end else begin
      op_done <= 1'b0;
      unique case (state)
        S_IDLE: if (op_valid) begin
          a <= op_addr; pat_q <= op_pat; dist_q <= op_dist;
          state <= op_new ? S_NEW : S_RD;
        end
        S_NEW: begin
          op_done <= 1'b1; op_updated <= 1'b0; state <= S_IDLE;
        end
        S_RD: state <= S_UPD;
        S_UPD: begin
          op_done <= 1'b1; op_updated <= renew; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
