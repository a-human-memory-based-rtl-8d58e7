// ocr_pkg: types, constants and arithmetic helpers shared by the character
// recognition and learning datapath.
//
// A pattern is a 16x16 binary character image (256 bits, bit v*16+u is row v,
// column u) together with a vector of FEAT_N moment features of FEAT_W bits.
// Distances are held in quarter units: D4 = D_H + 4*D_E, which is the
// weighted distance D = 0.25*D_H + 1*D_E scaled by four so that it stays an
// integer. The weights 0.25 and 1 are the document's; the scaling, the
// feature encoding and the word widths are this design's own choices.
package ocr_pkg;

  localparam int IMG_BITS = 256;
  localparam int FEAT_N   = 6;
  localparam int FEAT_W   = 8;
  localparam int DIST_W   = 12;   // max D4 = 256 + 4*625 = 2756

  typedef logic [IMG_BITS-1:0]         img_t;
  typedef logic [FEAT_N-1:0][FEAT_W-1:0] feat_t;
  typedef logic [DIST_W-1:0]           dist_t;

  typedef struct packed {
    img_t  img;
    feat_t feat;
  } pattern_t;

  // Outcome of one learning step for one input character. addr and rank
  // are 16 bits wide so that the type does not depend on N_REF; bits above
  // $clog2(N_REF) are always zero.
  typedef struct packed {
    logic        is_new;    // input stored as a new reference pattern
    logic        reliable;  // winner passed the reliability check
    logic        evicted;   // a short-term reference was forgotten
    logic        updated;   // Ref/Dth of the winner replaced by their means
    logic [15:0] addr;      // winner address, or address of the new reference
    dist_t       distance;  // winner-input distance (quarter units)
    logic [15:0] rank;      // rank position of addr after the ranking step
  } learn_result_t;


  // Number of ones in a 256-bit vector.
  function automatic logic [8:0] popcount256(input img_t v);
    logic [8:0] s;
    s = '0;
    for (int i = 0; i < IMG_BITS; i++) s += 9'(v[i]);
    return s;
  endfunction

  // Floor of the square root of a 20-bit value, restoring bit-by-bit method.
  function automatic logic [9:0] isqrt20(input logic [19:0] v);
    logic [9:0]  root;
    logic [19:0] sq;
    root = '0;
    for (int b = 9; b >= 0; b--) begin
      logic [9:0] trial;
      trial = root | (10'd1 << b);
      sq    = 20'(trial) * 20'(trial);
      if (sq <= v) root = trial;
    end
    return root;
  endfunction

  // Hybrid distance in quarter units: Hamming distance of the images plus
  // four times the (floored) Euclidean distance of the feature vectors.
  function automatic dist_t pattern_dist(input pattern_t a, input pattern_t b);
    logic [19:0] ss;
    logic [8:0]  dh;
    ss = '0;
    for (int k = 0; k < FEAT_N; k++) begin
      logic signed [FEAT_W:0] d;
      d  = $signed({1'b0, a.feat[k]}) - $signed({1'b0, b.feat[k]});
      ss += 20'(d * d);
    end
    dh = popcount256(a.img ^ b.img);
    return DIST_W'(dh) + DIST_W'({isqrt20(ss), 2'b00});
  endfunction

endpackage
