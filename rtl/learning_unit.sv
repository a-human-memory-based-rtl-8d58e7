// learning_unit: classification and on-line learning of one input pattern.
//
// Holds the reference memory, the nearest-match search, the reliability
// check, the ranking memory and the optimization unit, and steps one input
// through the learning procedure:
//   1. search the winner and nearest loser (N_REF+1 clocks);
//   2. compare the winner distance with the winner's threshold D_th: the
//      input is a known pattern when a winner exists and D < D_th, else it
//      becomes a new reference;
//   3. reliability check (high or low rank jump), ranking step, which for a
//      new reference also yields its address (possibly forgetting one);
//   4. optimization: write the new reference, or update the winner's means
//      and renew its Ref/D_th after N_th inputs.
// in_ready is high only when idle; res_valid pulses with the result
// N_REF+9 clocks (new reference) or N_REF+10 clocks (known pattern) after
// the input is taken. The sequence follows the
// document's learning flowchart; the strict "<" at the threshold, the
// handshake and the timing are this design's choices.
module learning_unit
  import ocr_pkg::*;
#(
  parameter int N_REF    = 512,
  parameter int S_POS    = 256,
  parameter int JS       = 5,
  parameter int JL       = 8,
  parameter int JLOW     = 1,
  parameter int C        = 16,
  parameter int NTH      = 8,
  parameter int DTH_INIT = 96,
  parameter int DTH_MIN  = 16,
  parameter int DTH_MAX  = 384,
  localparam int AW = $clog2(N_REF),
  localparam int NW = $clog2(N_REF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  pattern_t      in_pat,
  output logic          res_valid,
  output learn_result_t res,
  output logic [NW-1:0] ref_count
);
  typedef enum logic [2:0] {S_IDLE, S_SRCH_GO, S_SRCH, S_DECIDE, S_RANK, S_OPT_GO, S_OPT} state_t;
  state_t state;

  pattern_t      pat;
  logic          known, rel_q;
  logic [AW-1:0] target;

  // reference memory <-> search / optimization
  logic          ref_we, ref_rvalid;
  logic [AW-1:0] ref_waddr, ref_raddr;
  pattern_t      ref_wdata, ref_rdata;

  logic          s_done, s_found, s_los_found, s_busy;
  logic [AW-1:0] s_win_addr, s_los_addr;
  dist_t         s_win_dist, s_los_dist, dth;
  logic          reliable;

  logic          r_done, r_found, r_long, r_evicted;
  logic [AW-1:0] r_addr, r_pos, r_old_pos, r_rd_addr;

  logic          o_done, o_updated;

  assign in_ready = (state == S_IDLE);

  ref_memory #(.N_REF(N_REF)) u_ref (
    .clk, .rst_n, .we(ref_we), .waddr(ref_waddr), .wdata(ref_wdata),
    .raddr(ref_raddr), .rdata(ref_rdata), .rvalid(ref_rvalid)
  );

  assoc_search #(.N_REF(N_REF)) u_search (
    .clk, .rst_n, .start(state == S_SRCH_GO), .query(pat), .busy(s_busy), .done(s_done),
    .rd_addr(ref_raddr), .rd_data(ref_rdata), .rd_valid(ref_rvalid),
    .found(s_found), .win_addr(s_win_addr), .win_dist(s_win_dist),
    .los_found(s_los_found), .los_addr(s_los_addr), .los_dist(s_los_dist)
  );

  reliability_check #(.C(C)) u_rel (
    .win_dist(s_win_dist), .los_found(s_los_found), .los_dist(s_los_dist), .reliable
  );

  rank_memory #(.N_REF(N_REF), .S_POS(S_POS), .JS(JS), .JL(JL), .JLOW(JLOW)) u_rank (
    .clk, .rst_n, .op_valid(state == S_DECIDE),
    .op_new(!(s_found && s_win_dist < dth)), .op_addr(s_win_addr), .op_reliable(reliable),
    .op_done(r_done), .res_addr(r_addr), .res_pos(r_pos), .res_old_pos(r_old_pos),
    .res_found(r_found), .res_long(r_long), .res_evicted(r_evicted), .count(ref_count),
    .rd_pos(r_pos), .rd_addr(r_rd_addr)
  );

  optimization_unit #(.N_REF(N_REF), .NTH(NTH), .DTH_INIT(DTH_INIT), .DTH_MIN(DTH_MIN),
                      .DTH_MAX(DTH_MAX)) u_opt (
    .clk, .rst_n, .op_valid(state == S_OPT_GO), .op_new(!known), .op_addr(target),
    .op_pat(pat), .op_dist(s_win_dist), .op_done(o_done), .op_updated(o_updated),
    .ref_we, .ref_waddr, .ref_wdata, .dth_raddr(s_win_addr), .dth_rdata(dth)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; pat <= '0; known <= 1'b0; rel_q <= 1'b0; target <= '0;
      res_valid <= 1'b0; res <= '0;
    end else begin
      res_valid <= 1'b0;
      unique case (state)
        S_IDLE:    if (in_valid) begin pat <= in_pat; state <= S_SRCH_GO; end
        S_SRCH_GO: state <= S_SRCH;
        S_SRCH:    if (s_done) state <= S_DECIDE;
        S_DECIDE: begin
          known <= s_found && s_win_dist < dth;
          rel_q <= s_found && s_win_dist < dth && reliable;
          state <= S_RANK;
        end
        S_RANK: if (r_done) begin
          target <= r_addr;
          state  <= S_OPT_GO;
        end
        S_OPT_GO: state <= S_OPT;
        S_OPT: if (o_done) begin
          res_valid    <= 1'b1;
          res.is_new   <= !known;
          res.reliable <= rel_q;
          res.evicted  <= !known && r_evicted;
          res.updated  <= o_updated;
          res.addr     <= 16'(target);
          res.distance <= s_win_dist;
          res.rank     <= 16'(r_pos);
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
