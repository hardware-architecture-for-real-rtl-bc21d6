// fc_pkg: sizes, number formats and small helper functions shared by the
// EEG functional-connectivity design.
//
// Number formats (all unsigned unless noted):
//   * PLI weight w      : Q1.7 in W_W = 8 bits, 0 .. 128 stands for 0.0 .. 1.0.
//                         With a 128-sample window PLI = |count| / 128 exactly,
//                         so seven fraction bits hold it without rounding.
//   * phase             : signed Q3.12 radians in PH_W = 16 bits (pi = 12868).
//   * path distance     : Q.7 in DIST_W bits, edge length 1 - w = 128 - w.
//   * ratio outputs     : Q.16 (clustering coefficient, density, transitivity,
//                         characteristic path length).
// N_CH = 19 channels and WIN_L = 128 samples per window follow the document;
// the bit widths are this design's choice.
package fc_pkg;

  localparam int N_CH    = 19;   // EEG channels = graph nodes
  localparam int WIN_L   = 128;  // samples per PLI window
  localparam int EEG_W   = 16;   // EEG sample width (signed)
  localparam int W_W     = 8;    // PLI weight width, Q1.7
  localparam int W_FRAC  = 7;
  localparam int PH_W    = 16;   // phase width, signed Q3.12
  localparam int PH_FRAC = 12;
  localparam int FR      = 16;   // fraction bits of ratio outputs

  // pi in Q3.12
  localparam logic signed [PH_W-1:0] PH_PI = 16'sd12868;

  // number of unordered pairs among n items
  function automatic int n_choose_2(input int n);
    return (n * (n - 1)) / 2;
  endfunction

  // round(2^FR / d): a precomputed reciprocal, used instead of a divider
  function automatic int recip_q16(input int d);
    return ((1 << FR) + d / 2) / d;
  endfunction

endpackage
