// rep_accum: weighted accumulation for the repeated row/column permanent.
//
// Each valid input brings the column-sum product P of one Gray code, its
// coefficient b = prod_k C(M_k, Delta_k) and the parity of sum_k Delta_k.
// The accumulator adds (-1)^parity * b * P. Since sum |b| over all codes is
// 2^(n-1) <= 2^39 and |P| <= 1, REP_ACC_INT = 42 integer bits (with sign)
// cannot overflow; the 125 fraction bits are those of P. The result is
// 2^(n-1) times the permanent of the normalised expanded matrix. clear
// zeroes the accumulator, done pulses one cycle after the last input.
// Function from the document's formula; widths are this design's choice.
module rep_accum
  import perm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        in_valid,
  input  logic                        in_last,
  input  logic                        in_neg,
  input  logic [BINOM_W-1:0]          in_b,
  input  cplx_w_t                     prod,
  output logic signed [REP_ACC_W-1:0] acc_re,
  output logic signed [REP_ACC_W-1:0] acc_im,
  output logic                        done
);
  logic signed [REP_ACC_W-1:0] w_re, w_im, bb;

  assign bb   = REP_ACC_W'(in_b);   // zero-extended: b is unsigned
  assign w_re = REP_ACC_W'(prod.re) * bb;
  assign w_im = REP_ACC_W'(prod.im) * bb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
      done   <= 1'b0;
    end else begin
      done <= in_valid && in_last;
      if (clear) begin
        acc_re <= '0;
        acc_im <= '0;
      end else if (in_valid) begin
        acc_re <= in_neg ? acc_re - w_re : acc_re + w_re;
        acc_im <= in_neg ? acc_im - w_im : acc_im + w_im;
      end
    end
  end
endmodule
