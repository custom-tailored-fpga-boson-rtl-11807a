// perm_pkg: types and constants shared by the permanent engines.
//
// All matrix entries and column sums are complex fixed-point numbers whose
// real and imaginary parts are signed Q2.62 words (64 bits, 62 fraction
// bits). The host normalises the matrix so that every column sum satisfies
// -1 <= re, im, |re + i*im| <= 1, so products of column sums also stay in
// [-1, 1]. Inside the product tree the width of a value grows from level to
// level (64, 93, 110, then 127 bits); all levels keep two integer bits
// (sign and one), so a W-bit value has W-2 fraction bits.
//
// The widths, the matrix size limit of 40 and the six integer bits of the
// binary accumulator follow the document. The Q2.x format, the integer bits
// of the repeated-row accumulator and the coefficient width are this
// design's own choices.
package perm_pkg;

  localparam int N_MAX       = 40;   // largest matrix / photon count
  localparam int W_IN        = 64;   // width of a matrix entry or column sum part
  localparam int W_MAX       = 127;  // widest product-tree word
  localparam int FRAC_MAX    = W_MAX - 2;
  localparam int ACC_INT     = 6;    // integer bits (with sign) of the binary accumulator
  localparam int ACC_W       = ACC_INT + FRAC_MAX;
  localparam int PREFIX_BITS = 2;    // fixed delta bits spread over the kernels
  localparam int NKERN       = 1 << PREFIX_BITS;
  localparam int CMUL_LAT    = 3;    // pipeline depth of one complex multiplier
  localparam int IDX_W       = 6;    // row / column / count index width
  localparam int MULT_W      = 6;    // multiplicity width (0..40)
  localparam int BINOM_W     = 40;   // product of binomials, <= 2^(n-1)
  localparam int REP_ACC_INT = 42;   // integer bits (with sign) of the repeated accumulator
  localparam int REP_ACC_W   = REP_ACC_INT + FRAC_MAX;

  // One in Q2.62
  localparam logic signed [W_IN-1:0] ONE_IN = 64'sh4000_0000_0000_0000;

  typedef struct packed {
    logic signed [W_IN-1:0] re;
    logic signed [W_IN-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [W_MAX-1:0] re;
    logic signed [W_MAX-1:0] im;
  } cplx_w_t;

  // Input word width of product-tree level l (level 0 multiplies column sums).
  function automatic int level_width(input int l);
    case (l)
      0:       return 64;
      1:       return 93;
      2:       return 110;
      default: return 127;
    endcase
  endfunction

  // Number of tree levels needed to reduce n leaves to one.
  function automatic int tree_levels(input int n);
    int c, l;
    c = n;
    l = 0;
    while (c > 1) begin
      c = (c + 1) / 2;
      l++;
    end
    return l;
  endfunction

  // Number of values present at level l of a tree with n leaves.
  function automatic int level_count(input int n, input int l);
    int c;
    c = n;
    for (int i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

endpackage
