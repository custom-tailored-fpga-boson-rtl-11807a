// product_tree: pipelined product of N complex column sums.
//
// A binary tree of cmul instances reduces the N leaves to one product. For
// N = 40 the levels hold 20, 10, 5, 2, 1 and 1 multipliers (depth 6); an odd
// value left over at a level is carried to the next level through a delay
// line as long as a multiplier. Input words of level l are
// perm_pkg::level_width(l) bits wide (64, 93, 110, then 127), following the
// document; every level keeps two integer bits. Internally each level's
// values are held MSB-aligned in W_MAX-bit words, so the unused low bits of
// the narrow levels are constant zero.
//
// Interface: one set of N leaves per cycle (in_valid), with a TAG_W-bit tag
// that travels alongside. The product appears LAT = levels * CMUL_LAT cycles
// later with out_valid and the same tag. There is no back-pressure: the
// tree accepts a new input every cycle. Leaves that should not take part in
// the product are driven with one by the caller.
module product_tree
  import perm_pkg::*;
#(
  parameter int N     = N_MAX,
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  cplx_t            leaf [N],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output cplx_w_t          prod
);
  localparam int L   = tree_levels(N);
  localparam int LAT = L * CMUL_LAT;

  // value i of level l, MSB-aligned
  logic signed [W_MAX-1:0] v_re [L+1][N];
  logic signed [W_MAX-1:0] v_im [L+1][N];

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign v_re[0][i] = W_MAX'(leaf[i].re) << (W_MAX - W_IN);
    assign v_im[0][i] = W_MAX'(leaf[i].im) << (W_MAX - W_IN);
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int WI   = level_width(l);
    localparam int WO   = (l == L - 1) ? W_MAX : level_width(l + 1);
    localparam int CIN  = level_count(N, l);
    localparam int COUT = level_count(N, l + 1);
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i < COUT && 2 * i + 1 < CIN) begin : g_mul
        logic signed [WO-1:0] p_re, p_im;
        cmul #(.WI(WI), .WO(WO)) u_mul (
          .clk  (clk),
          .a_re (v_re[l][2*i][W_MAX-1 -: WI]),
          .a_im (v_im[l][2*i][W_MAX-1 -: WI]),
          .b_re (v_re[l][2*i+1][W_MAX-1 -: WI]),
          .b_im (v_im[l][2*i+1][W_MAX-1 -: WI]),
          .p_re (p_re),
          .p_im (p_im)
        );
        assign v_re[l+1][i] = W_MAX'(p_re) << (W_MAX - WO);
        assign v_im[l+1][i] = W_MAX'(p_im) << (W_MAX - WO);
      end else if (i < COUT) begin : g_pass
        // odd value out: delay it as long as a multiplier, narrowed to WO
        logic signed [WO-1:0] d_re [CMUL_LAT];
        logic signed [WO-1:0] d_im [CMUL_LAT];
        always_ff @(posedge clk) begin
          d_re[0] <= v_re[l][2*i][W_MAX-1 -: WO];
          d_im[0] <= v_im[l][2*i][W_MAX-1 -: WO];
          for (int k = 1; k < CMUL_LAT; k++) begin
            d_re[k] <= d_re[k-1];
            d_im[k] <= d_im[k-1];
          end
        end
        assign v_re[l+1][i] = W_MAX'(d_re[CMUL_LAT-1]) << (W_MAX - WO);
        assign v_im[l+1][i] = W_MAX'(d_im[CMUL_LAT-1]) << (W_MAX - WO);
      end else begin : g_none
        assign v_re[l+1][i] = '0;
        assign v_im[l+1][i] = '0;
      end
    end
  end

  assign prod.re = v_re[L][0];
  assign prod.im = v_im[L][0];

  // valid and tag travel with the data
  logic [LAT-1:0]   vpipe;
  logic [TAG_W-1:0] tpipe [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      for (int k = 0; k < LAT; k++) tpipe[k] <= '0;
    end else begin
      vpipe <= {vpipe[LAT-2:0], in_valid};
      tpipe[0] <= in_tag;
      for (int k = 1; k < LAT; k++) tpipe[k] <= tpipe[k-1];
    end
  end
  assign out_valid = vpipe[LAT-1];
  assign out_tag   = tpipe[LAT-1];
endmodule
