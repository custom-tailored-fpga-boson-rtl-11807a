// binom_update: incremental update of a product of binomial coefficients.
//
// b holds prod_k C(mult_k, Delta_k). When one Gray digit moves from
// Delta = k, the matching factor changes and
//   falling (Delta -> k-1): b' = b * k / (m - k + 1)
//   rising  (Delta -> k+1): b' = b * (m - k) / (k + 1)
// with m the digit's multiplicity. The division is always exact and is done
// by multiplying with a "magic number" ceil(2^S / d) and shifting right by
// S; with S = XW + 6 bits this is exact for every dividend below 2^XW and
// every divisor up to 63. The magic numbers are a constant table built at
// elaboration. The update formulas and the magic-number division are the
// document's; the unit here is purely combinational (the caller registers
// b), where the document pipelines its loop over 9 cycles.
module binom_update #(
  parameter int BW = 40,  // coefficient width
  parameter int MW = 6    // multiplicity width
) (
  input  logic [BW-1:0] b,
  input  logic [MW-1:0] k,      // Delta before the step
  input  logic [MW-1:0] m,      // multiplicity of the digit
  input  logic          dec,    // 1: Delta falls, 0: Delta rises
  output logic [BW-1:0] b_new
);
  localparam int XW  = BW + MW;      // dividend width
  localparam int S   = XW + MW;      // magic shift
  localparam int MGW = S + 1;        // magic width
  localparam int ND  = 1 << MW;
  // S must stay below 63 for the table arithmetic

  typedef logic [MGW-1:0] magic_tab_t [ND];

  function automatic magic_tab_t make_tab();
    magic_tab_t t;
    t[0] = '0;
    for (int d = 1; d < ND; d++)
      t[d] = MGW'(((longint'(1) << S) + longint'(d) - 1) / longint'(d));
    return t;
  endfunction

  localparam magic_tab_t MAGIC = make_tab();

  logic [MW-1:0]      num, den;
  logic [XW-1:0]      x;
  logic [XW+MGW-1:0]  prod;

  always_comb begin
    num   = dec ? k : m - k;
    den   = dec ? m - k + 1'b1 : k + 1'b1;
    x     = XW'(b) * XW'(num);
    prod  = (XW+MGW)'(x) * (XW+MGW)'(MAGIC[den]);
    b_new = BW'(prod >> S);
  end
endmodule
