// rank_memory: ranking memory and ranking process of the learning model.
//
// The memory is a list of reference-pattern addresses ordered by rank:
// position 0 is the top rank (rank_1), positions 0 .. S_POS-1 form the
// long-term memory and positions S_POS .. N_REF-1 the short-term memory
// (S_POS is the border rank s_rank). Occupied positions are always 0 ..
// count-1. One operation per op_valid, finished in that clock; op_done and
// the res_* outputs follow one clock later.
//
// Known winner (op_new=0): the winner's position p is found by comparing all
// positions at once. The jump is JL if p is in long-term memory and JS if
// in short-term memory when op_reliable=1, and JLOW otherwise. The winner
// moves to max(p-jump,0) and every entry it passes moves down by one rank,
// so entries cross the long/short border in both directions.
//
// New reference (op_new=1): while the long-term memory is not full, the new
// reference gets the lowest unoccupied long-term rank (position count).
// Afterwards it gets the top short-term rank S_POS and every short-term
// entry moves down by one; when the memory is full, the entry at the lowest
// rank is forgotten (res_evicted=1) and its address is handed to the new
// reference. Until then new references get addresses 0, 1, 2, ... in order.
// res_addr is the address that was ranked; rd_pos/rd_addr read the list.
//
// Ranking by jumps J_S < J_L, shift-down of the passed ranks, insertion at
// the top of short-term memory with forgetting of the lowest rank, and the
// long-term-first filling all follow the document; JS=5 matches its
// example. JL=8, JLOW=1, the sizes, the use of the reliability flag to pick
// the low jump, and the single-clock parallel implementation are this
// design's choices.
module rank_memory #(
  parameter int N_REF = 512,
  parameter int S_POS = 256,
  parameter int JS    = 5,
  parameter int JL    = 8,
  parameter int JLOW  = 1,
  localparam int AW = $clog2(N_REF),
  localparam int NW = $clog2(N_REF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          op_valid,
  input  logic          op_new,
  input  logic [AW-1:0] op_addr,
  input  logic          op_reliable,
  output logic          op_done,
  output logic [AW-1:0] res_addr,
  output logic [AW-1:0] res_pos,
  output logic [AW-1:0] res_old_pos,
  output logic          res_found,
  output logic          res_long,
  output logic          res_evicted,
  output logic [NW-1:0] count,
  input  logic [AW-1:0] rd_pos,
  output logic [AW-1:0] rd_addr
);
  logic [AW-1:0] tab [N_REF];
  logic [AW-1:0] tab_nx [N_REF];
  logic          found, is_long, evict;
  int            pos, tgt;
  logic [AW-1:0] new_addr;
  logic [NW-1:0] count_nx;

  assign rd_addr = tab[rd_pos];

  always_comb begin
    int jump;
    found = 1'b0;
    pos   = 0;
    for (int k = 0; k < N_REF; k++)
      if (!found && k < int'(count) && tab[k] == op_addr) begin
        found = 1'b1;
        pos   = k;
      end
    is_long  = pos < S_POS;
    jump     = op_reliable ? (is_long ? JL : JS) : JLOW;
    evict    = 1'b0;
    new_addr = AW'(count);
    count_nx = count;
    tab_nx   = tab;
    tgt      = 0;
    if (op_new) begin
      if (int'(count) < S_POS) begin
        tgt = int'(count);
        tab_nx[tgt] = new_addr;
        count_nx = count + 1'b1;
      end else begin
        tgt = S_POS;
        if (int'(count) == N_REF) begin
          evict    = 1'b1;
          new_addr = tab[N_REF-1];
        end else begin
          count_nx = count + 1'b1;
        end
        for (int k = S_POS + 1; k < N_REF; k++) tab_nx[k] = tab[k-1];
        tab_nx[S_POS] = new_addr;
      end
    end else if (found) begin
      tgt = (pos >= jump) ? pos - jump : 0;
      for (int k = 1; k < N_REF; k++)
        if (k > tgt && k <= pos) tab_nx[k] = tab[k-1];
      tab_nx[tgt] = op_addr;
    end
  end

  always_ff @(posedge clk) begin
    if (op_valid) tab <= tab_nx;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0; op_done <= 1'b0;
      res_addr <= '0; res_pos <= '0; res_old_pos <= '0;
      res_found <= 1'b0; res_long <= 1'b0; res_evicted <= 1'b0;
    end else begin
      op_done <= op_valid;
      if (op_valid) begin
        count       <= count_nx;
        res_addr    <= op_new ? new_addr : op_addr;
        res_pos     <= AW'(tgt);
        res_old_pos <= AW'(pos);
        res_found   <= op_new || found;
        res_long    <= is_long;
        res_evicted <= evict;
      end
    end
  end
endmodule
