// assoc_search: nearest-match search over the reference pattern memory.
//
// After start, the addresses 0 .. N_REF-1 are read one per clock from
// ref_memory. For each valid entry the hybrid distance to the query,
// D4 = D_H(image) + 4*D_E(features) (ocr_pkg::pattern_dist), is computed
// and the two smallest are kept: the winner and the nearest loser (ties keep
// the lower address). done pulses N_REF+1 clocks after start; found and
// los_found tell whether a winner and a loser exist. The distance measure and
// the winner/nearest-loser outputs follow the document; the document's
// mixed-signal fully-parallel associative memory is replaced by this
// sequential digital search.
module assoc_search
  import ocr_pkg::*;
#(
  parameter int N_REF = 512,
  localparam int AW = $clog2(N_REF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  pattern_t      query,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] rd_addr,
  input  pattern_t      rd_data,
  input  logic          rd_valid,
  output logic          found,
  output logic [AW-1:0] win_addr,
  output dist_t         win_dist,
  output logic          los_found,
  output logic [AW-1:0] los_addr,
  output dist_t         los_dist
);
  logic          run, p_valid, p_last;
  logic [AW-1:0] p_addr;
  pattern_t      q;
  dist_t         d;

  assign busy = run || p_valid;
  assign d    = pattern_dist(q, rd_data);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; rd_addr <= '0; p_valid <= 1'b0; p_last <= 1'b0; p_addr <= '0;
      done <= 1'b0; found <= 1'b0; los_found <= 1'b0;
      win_addr <= '0; los_addr <= '0; win_dist <= '1; los_dist <= '1; q <= '0;
    end else begin
      done    <= 1'b0;
      p_valid <= run;
      p_last  <= run && (rd_addr == AW'(N_REF - 1));
      p_addr  <= rd_addr;
      if (!run && !p_valid && start) begin
        run <= 1'b1; rd_addr <= '0; q <= query;
        found <= 1'b0; los_found <= 1'b0; win_dist <= '1; los_dist <= '1;
      end else if (run) begin
        if (rd_addr == AW'(N_REF - 1)) run <= 1'b0;
        else rd_addr <= rd_addr + 1'b1;
      end
      if (p_valid) begin
        if (rd_valid) begin
          if (!found || d < win_dist) begin
            los_found <= found; los_dist <= win_dist; los_addr <= win_addr;
            found <= 1'b1; win_dist <= d; win_addr <= p_addr;
          end else if (!los_found || d < los_dist) begin
            los_found <= 1'b1; los_dist <= d; los_addr <= p_addr;
          end
        end
        if (p_last) done <= 1'b1;
      end
    end
  end
endmodule
