// glynn_perm_top: permanent of an n x n complex matrix (n <= N) by the
// BB/FG (Glynn) formula with a reflected binary Gray code.
//
//   perm(A) = 2^-(n-1) * sum_delta (prod_k delta_k) prod_j sum_i delta_i a_ij
//
// delta_0 is fixed to +1. Rows 1 and 2 are fixed per "prefix": four
// column-sum kernels, one per quarter of the columns, each keep the column
// sums of all four prefixes, stepped by their own Gray-code counters over
// rows 3..n-1. Each cycle every kernel sends its quarter of the four
// prefixes' column sums to four product trees (one per prefix), and the
// accumulator adds the four signed products. One Gray step per cycle covers
// the 2^(n-1) delta vectors in 2^(n-3) cycles. In dual mode two such engines
// (two boards) split the work on row 3: board board_id fixes delta_3 to
// +1 (0) or -1 (1), the counter covers rows 4..n-1 and the host adds the two
// results.
//
// Interface: pulse start with n (3 <= n <= N, 4 <= n in dual mode),
// dual_en and board_id. The engine then takes n rows on row_data (one row of
// N entries per cycle while row_valid && row_ready; entries at or beyond
// column n are ignored), runs, and pulses done with perm_re/perm_im =
// 2^(n-1) * perm of the loaded matrix in Q6.125. The host normalises the
// matrix so that every column sum has magnitude at most one.
// Timing with row_valid held high: done follows start by
// n + 2^(n-3) + 3 + 3*levels cycles (levels = 6 for N = 40).
// The architecture follows the document; the row-per-cycle loading, the
// handshake and the dual-mode split on row 3 are this design's choices.
module glynn_perm_top
  import perm_pkg::*;
#(
  parameter int N = N_MAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [IDX_W-1:0]        n,
  input  logic                    dual_en,
  input  logic                    board_id,
  input  logic                    row_valid,
  output logic                    row_ready,
  input  cplx_t                   row_data [N],
  output logic                    busy,
  output logic                    done,
  output logic signed [ACC_W-1:0] perm_re,
  output logic signed [ACC_W-1:0] perm_im
);
  localparam int Q = N / NKERN;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_KICK, S_RUN} state_t;
  state_t state;

  logic [IDX_W-1:0] n_r, row_cnt;
  logic             dual_r, board_r;
  logic             load_fire, kick;

  assign row_ready = (state == S_LOAD);
  assign load_fire = row_valid && row_ready;
  assign kick      = (state == S_KICK);
  assign busy      = (state != S_IDLE);

  logic acc_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      n_r     <= '0;
      row_cnt <= '0;
      dual_r  <= 1'b0;
      board_r <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          n_r     <= n;
          dual_r  <= dual_en;
          board_r <= board_id;
          row_cnt <= '0;
          state   <= S_LOAD;
        end
        S_LOAD: if (load_fire) begin
          row_cnt <= row_cnt + 1'b1;
          if (row_cnt == n_r - 1'b1) state <= S_KICK;
        end
        S_KICK: state <= S_RUN;
        S_RUN:  if (acc_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = acc_done;

  // kernel outputs
  logic  k_valid [NKERN];
  logic  k_last  [NKERN];
  logic  k_par   [NKERN];
  cplx_t k_cs    [NKERN][NKERN][Q];   // [kernel][prefix][column]

  for (genvar k = 0; k < NKERN; k++) begin : g_kern
    cplx_t slice [Q];
    cplx_t base  [Q];
    for (genvar j = 0; j < Q; j++) begin : g_col
      assign slice[j] = row_data[k*Q + j];
    end
    colsum_init #(.Q(Q)) u_init (
      .clk(clk), .rst_n(rst_n), .clear(start && state == S_IDLE),
      .row_valid(load_fire), .row_idx(row_cnt), .n(n_r),
      .row(slice), .sum(base)
    );
    colsum_update #(.N(N), .Q(Q), .KID(k)) u_cs (
      .clk(clk), .rst_n(rst_n),
      .load_valid(load_fire), .load_idx(row_cnt), .load_row(slice),
      .base(base), .start(kick), .n(n_r),
      .dual_en(dual_r), .board_id(board_r),
      .out_valid(k_valid[k]), .out_last(k_last[k]), .out_parity(k_par[k]),
      .out_cs(k_cs[k])
    );
  end

  // product kernels, one per prefix, each fed by all column kernels
  logic    p_valid [NKERN];
  logic    p_last  [NKERN];
  logic    p_par   [NKERN];
  cplx_w_t p_prod  [NKERN];

  for (genvar p = 0; p < NKERN; p++) begin : g_prod
    cplx_t leaves [N];
    logic [1:0] tag;
    for (genvar k = 0; k < NKERN; k++) begin : g_k
      for (genvar j = 0; j < Q; j++) begin : g_j
        assign leaves[k*Q + j] = k_cs[k][p][j];
      end
    end
    product_tree #(.N(N), .TAG_W(2)) u_tree (
      .clk(clk), .rst_n(rst_n),
      .in_valid(k_valid[p]), .in_tag({k_last[p], k_par[p]}),
      .leaf(leaves),
      .out_valid(p_valid[p]), .out_tag(tag), .prod(p_prod[p])
    );
    assign p_last[p] = tag[1];
    assign p_par[p]  = tag[0];
  end

  perm_accum u_acc (
    .clk(clk), .rst_n(rst_n), .clear(start && state == S_IDLE),
    .in_valid(p_valid[0]), .in_last(p_last[0]),
    .in_neg(p_par[0] ^ (dual_r & board_r)),
    .prod(p_prod), .acc_re(perm_re), .acc_im(perm_im), .done(acc_done)
  );
endmodule
