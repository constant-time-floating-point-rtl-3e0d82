// fpa_pkg: formats and constants shared by the constant-time floating point adder.
// The adder works on IEEE 754 double precision words: one sign bit, an 11-bit biased exponent
// in bits [62:52] and a 52-bit fraction in bits [51:0]. The significand that the datapath
// handles is the fraction with its hidden leading '1' prefixed, 53 bits wide. These widths are
// the ones of the 64-bit format the design targets; they are constants, not parameters, because
// every block of the datapath is sized from them.
package fpa_pkg;

  localparam int unsigned EXP_W  = 11;            // exponent field width
  localparam int unsigned FRAC_W = 52;            // fraction field width
  localparam int unsigned SIG_W  = FRAC_W + 1;    // significand with the hidden '1'
  localparam int unsigned POS_W  = $clog2(SIG_W); // width of a bit index into the significand

  typedef logic [EXP_W-1:0]  exp_t;
  typedef logic [FRAC_W-1:0] frac_t;
  typedef logic [SIG_W-1:0]  sig_t;
  typedef logic [POS_W-1:0]  pos_t;

  // One IEEE 754 double precision word, field by field.
  typedef struct packed {
    logic  sign;
    exp_t  exp;
    frac_t frac;
  } fp64_t;

endpackage
