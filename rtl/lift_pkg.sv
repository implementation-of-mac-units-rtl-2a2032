// lift_pkg: constants and types shared by the parallel-MAC lifting datapath.
//
// Samples are signed DATA_W-bit integers, coefficients signed COEF_W-bit
// fixed-point numbers with FRAC_W fraction bits (Q2.14 by default, enough for
// the usual lifting coefficients of magnitude below 2). The widths, the
// number of MAC units and the depth of the programmable delay are this
// design's choices; the architecture itself only fixes the number of MACs as
// the longest lifting filter of the transform.
//
// A coefficient travels with its window markers as a coef_tok_t: 'first'
// opens a new accumulation window, 'last' closes it.
package lift_pkg;
  localparam int unsigned DATA_W    = 16;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned FRAC_W    = 14;
  localparam int unsigned NMAC      = 4;
  localparam int unsigned MAX_DELAY = 16;
  // a sum of NMAC products of DATA_W x COEF_W bits
  localparam int unsigned ACC_W     = DATA_W + COEF_W + $clog2(NMAC);

  typedef struct packed {
    logic                     valid;
    logic                     first;
    logic                     last;
    logic signed [COEF_W-1:0] coef;
  } coef_tok_t;
endpackage
