// bitfmt_pkg - shared types, helpers and constants of the bit-formatted
// sum-of-products (SoP) datapath.
//
// A fixed-point format (FPF) is written (m, l): m is the position of the sign
// bit (MSB) and l the position of the LSB, so a word of that format has
// w = m - l + 1 bits and the integer X it stores means X * 2^l.
//
// The package holds:
//   * round_mode_e : how a word is rounded when LSBs are dropped, truncation
//                    (round down) or round-to-nearest.
//   * ceil_log2    : ceil(log2(n)), the number of guard bits for n terms.
//   * the worked example, a 4th-order Butterworth low-pass filter
//     (cut-off 0.136 of Nyquist) in Direct Form I with 16-bit constants and
//     16-bit variables: u on (4,-11), y on (5,-10). The constants are
//     C = round(c * 2^-l), and l follows from the constant's MSB
//     m = ceil(log2(-c)) for c < 0, floor(log2(c)) + 1 for c > 0, and
//     l = m - 15. The feedback constants are stored already negated
//     (-a_i), so that the filter is a pure sum of products.
// Tie-breaking of round-to-nearest (round half up) is this design's choice.
package bitfmt_pkg;

  typedef enum logic {
    RND_TRUNC   = 1'b0,  // round down: drop the LSBs
    RND_NEAREST = 1'b1   // round to nearest, ties rounded up
  } round_mode_e;

  // ceil(log2(n)) for n >= 1; 0 for n <= 1.
  function automatic int ceil_log2(input int n);
    int r;
    r = 0;
    while (r < 31 && (1 << r) < n) r++;
    return r;
  endfunction

  // Word-length of a format (m, l).
  function automatic int wlen(input int m, input int l);
    return m - l + 1;
  endfunction

  // ---------------------------------------------------------------------
  // Butterworth example, butter(4, 0.136)
  // ---------------------------------------------------------------------
  localparam int BW_W     = 16;   // every constant and variable is 16 bits
  localparam int BW_NB    = 5;    // b_0 .. b_4
  localparam int BW_NA    = 4;    // a_1 .. a_4
  localparam int BW_L_U   = -11;  // u on (4, -11)
  localparam int BW_L_Y   = -10;  // y on (5, -10)
  localparam int BW_M_F   = 5;    // final format (5, -10)
  localparam int BW_L_F   = -10;

  // b_i : 0.001328017792779, 0.005312071171115, 0.007968106756673,
  //       0.005312071171115, 0.001328017792779
  localparam int BW_B_INT [BW_NB] = '{22280, 22280, 16710, 22280, 22280};
  localparam int BW_B_LSB [BW_NB] = '{-24, -22, -21, -22, -24};

  // -a_i : 2.871116228316502, -3.208250066295749, 1.634594881084453,
  //        -0.318709327789667
  localparam int BW_NA_INT [BW_NA] = '{23520, -26282, 26781, -20887};
  localparam int BW_NA_LSB [BW_NA] = '{-13, -13, -14, -16};

endpackage
