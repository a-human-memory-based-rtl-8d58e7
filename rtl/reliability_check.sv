// reliability_check: decides between the high and the low rank jump.
//
// The winner is reliable when the nearest loser is farther from the input
// than the winner by more than the constant C (distances in quarter units),
// or when there is no loser at all. Purely combinational. The comparison of
// winner and nearest loser with a margin C follows the document; reading it
// as a difference of distances, the no-loser case and C=16 are this design's
// choices.
module reliability_check
  import ocr_pkg::*;
#(
  parameter int C = 16
) (
  input  dist_t win_dist,
  input  logic  los_found,
  input  dist_t los_dist,
  output logic  reliable
);
  always_comb begin
    if (!los_found) reliable = 1'b1;
    else reliable = (int'(los_dist) - int'(win_dist)) > C;
  end
endmodule
