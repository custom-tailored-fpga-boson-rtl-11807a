// perm_accum: signed accumulation of the four product streams.
//
// Each cycle with in_valid, the four products P_p of the delta prefixes
// p = 0..3 arrive together. Each is added with the sign of its delta vector,
// prod_k delta_k, which is the Gray-code parity (in_neg) flipped once more
// for every set bit of p, and the sum is added to the running permanent.
// The accumulator has ACC_INT = 6 integer bits including the sign, the
// bound the document derives for n = 40, and the 125 fraction bits of the
// products. The result is 2^(n-1) times the permanent of the normalised
// matrix; the host applies the power of two and the normalisation.
// clear zeroes the accumulator; done pulses for one cycle after the input
// flagged in_last has been added, and acc_re/acc_im hold the result until
// the next clear.
module perm_accum
  import perm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic                    in_neg,
  input  cplx_w_t                 prod [NKERN],
  output logic signed [ACC_W-1:0] acc_re,
  output logic signed [ACC_W-1:0] acc_im,
  output logic                    done
);
  logic signed [ACC_W-1:0] term_re, term_im;

  always_comb begin
    term_re = '0;
    term_im = '0;
    for (int p = 0; p < NKERN; p++) begin
      if (in_neg ^ (^p[PREFIX_BITS-1:0])) begin
        term_re = term_re - ACC_W'(prod[p].re);
        term_im = term_im - ACC_W'(prod[p].im);
      end else begin
        term_re = term_re + ACC_W'(prod[p].re);
        term_im = term_im + ACC_W'(prod[p].im);
      end
    end
  end

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
        acc_re <= acc_re + term_re;
        acc_im <= acc_im + term_im;
      end
    end
  end
endmodule
