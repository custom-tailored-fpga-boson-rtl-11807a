// colsum_init: initial column sums of one group of Q columns.
//
// While the matrix streams in one row per cycle, this block adds every row
// with index below n into its Q running column sums, giving
// sum_j = sum_{i<n} a_ij, the column sums for the all-plus delta vector.
// clear zeroes the sums before a new matrix. The sums are registered: they
// include a row the cycle after row_valid. The document names one such
// initialisation kernel per column group; its adder structure is this
// design's own.
module colsum_init
  import perm_pkg::*;
#(
  parameter int Q = N_MAX / NKERN
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             row_valid,
  input  logic [IDX_W-1:0] row_idx,
  input  logic [IDX_W-1:0] n,
  input  cplx_t            row [Q],
  output cplx_t            sum [Q]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < Q; j++) sum[j] <= '0;
    end else if (clear) begin
      for (int j = 0; j < Q; j++) sum[j] <= '0;
    end else if (row_valid && row_idx < n) begin
      for (int j = 0; j < Q; j++) begin
        sum[j].re <= sum[j].re + row[j].re;
        sum[j].im <= sum[j].im + row[j].im;
      end
    end
  end
endmodule
