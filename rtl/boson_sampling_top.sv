// boson_sampling_top: the two permanent engines of the design, side by side.
//
// The binary engine (glynn_perm_top) computes the permanent of an n x n
// complex matrix with the BB/FG formula, split over four column kernels and
// four product kernels, optionally as one half of a two-board pair. The
// repeated engine (rep_perm_top) computes permanents of matrices with
// repeated rows and columns, as needed when several photons share a mode.
// In the document each engine is its own FPGA image; here both share a clock
// and reset and keep their own ports (prefix g_ for the binary engine, r_
// for the repeated one). See the two engines for interface and timing.
module boson_sampling_top
  import perm_pkg::*;
#(
  parameter int N = N_MAX
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // binary Glynn engine
  input  logic                        g_start,
  input  logic [IDX_W-1:0]            g_n,
  input  logic                        g_dual_en,
  input  logic                        g_board_id,
  input  logic                        g_row_valid,
  output logic                        g_row_ready,
  input  cplx_t                       g_row_data [N],
  output logic                        g_busy,
  output logic                        g_done,
  output logic signed [ACC_W-1:0]     g_perm_re,
  output logic signed [ACC_W-1:0]     g_perm_im,
  // repeated row/column engine
  input  logic                        r_start,
  input  logic [IDX_W-1:0]            r_m,
  input  logic [MULT_W-1:0]           r_row_mult [N],
  input  logic [MULT_W-1:0]           r_col_mult [N],
  input  logic                        r_row_valid,
  output logic                        r_row_ready,
  input  cplx_t                       r_row_data [N],
  output logic                        r_busy,
  output logic                        r_done,
  output logic signed [REP_ACC_W-1:0] r_perm_re,
  output logic signed [REP_ACC_W-1:0] r_perm_im
);
  glynn_perm_top #(.N(N)) u_glynn (
    .clk(clk), .rst_n(rst_n), .start(g_start), .n(g_n), .dual_en(g_dual_en),
    .board_id(g_board_id), .row_valid(g_row_valid), .row_ready(g_row_ready),
    .row_data(g_row_data), .busy(g_busy), .done(g_done),
    .perm_re(g_perm_re), .perm_im(g_perm_im)
  );

  rep_perm_top #(.N(N)) u_rep (
    .clk(clk), .rst_n(rst_n), .start(r_start), .m(r_m), .row_mult(r_row_mult),
    .col_mult(r_col_mult), .row_valid(r_row_valid), .row_ready(r_row_ready),
    .row_data(r_row_data), .busy(r_busy), .done(r_done),
    .perm_re(r_perm_re), .perm_im(r_perm_im)
  );
endmodule
