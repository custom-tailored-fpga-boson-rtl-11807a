// rep_perm_top: permanent of a matrix with repeated rows and columns.
//
// For an m x m matrix A whose row k is repeated M_k times and column j N_j
// times (n = sum M_k = sum N_j photons, n <= N) the engine evaluates
//   perm = 2^-(n-1) sum_Delta prod_k (-1)^Delta_k C(M'_k, Delta_k)
//                   prod_j (sum_k (M_k - 2 Delta_k) a_kj)^N_j
// Row 0 is the anchor: one of its photons is fixed, so Delta_0 runs over
// 0..M_0-1 (M'_0 = M_0 - 1) and Delta_k over 0..M_k for the other rows
// (M'_k = M_k), in the order of a reflected mixed-radix Gray code. Per
// cycle one code is processed: the Gray counter names the digit that moved,
// the binomial unit updates the coefficient, the column-sum unit updates the
// sums and fans each column out to N_j photon slots, the product tree forms
// the product of the n slots and the accumulator adds the signed, weighted
// product.
//
// Interface: pulse start with m (1..N), row_mult (M_k, M_0 >= 1) and
// col_mult (N_j), which are held until done; then m rows of N entries are
// taken one per cycle while row_valid && row_ready. done pulses with
// perm_re/perm_im = 2^(n-1) * perm in Q42.125. Timing with row_valid held
// high: done follows start by m + prod_k (M'_k + 1) + 3 + 3*levels cycles.
// The formula, the anchor row and the direction-encoded Gray code are the
// document's; the document also staggers several Gray-code walks to hide a
// 9-cycle coefficient loop, which this engine does not (its coefficient
// loop is one cycle).
module rep_perm_top
  import perm_pkg::*;
#(
  parameter int N = N_MAX
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [IDX_W-1:0]            m,
  input  logic [MULT_W-1:0]           row_mult [N],
  input  logic [MULT_W-1:0]           col_mult [N],
  input  logic                        row_valid,
  output logic                        row_ready,
  input  cplx_t                       row_data [N],
  output logic                        busy,
  output logic                        done,
  output logic signed [REP_ACC_W-1:0] perm_re,
  output logic signed [REP_ACC_W-1:0] perm_im
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_KICK, S_RUN} state_t;
  state_t state;

  logic [IDX_W-1:0]  m_r, row_cnt;
  logic [MULT_W-1:0] rm_r [N];
  logic [MULT_W-1:0] cm_r [N];
  logic [MULT_W-1:0] gmult [N];
  logic              load_fire, kick, acc_done, clear;

  assign row_ready = (state == S_LOAD);
  assign load_fire = row_valid && row_ready;
  assign kick      = (state == S_KICK);
  assign busy      = (state != S_IDLE);
  assign clear     = start && state == S_IDLE;
  assign done      = acc_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      m_r     <= '0;
      row_cnt <= '0;
      for (int k = 0; k < N; k++) begin
        rm_r[k] <= '0;
        cm_r[k] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          m_r     <= m;
          row_cnt <= '0;
          for (int k = 0; k < N; k++) begin
            rm_r[k] <= (k < int'(m)) ? row_mult[k] : '0;
            cm_r[k] <= (k < int'(m)) ? col_mult[k] : '0;
          end
          state <= S_LOAD;
        end
        S_LOAD: if (load_fire) begin
          row_cnt <= row_cnt + 1'b1;
          if (row_cnt == m_r - 1'b1) state <= S_KICK;
        end
        S_KICK: state <= S_RUN;
        S_RUN:  if (acc_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Gray digit ranges: the anchor row loses one photon
  always_comb begin
    for (int k = 0; k < N; k++)
      gmult[k] = (k == 0 && rm_r[0] != '0) ? rm_r[0] - 1'b1 : rm_r[k];
  end

  logic              g_valid, g_flip, g_inc, g_par, g_last;
  logic [IDX_W-1:0]  g_idx;
  logic [MULT_W-1:0] g_old;

  ngray_counter #(.D(N), .IDX_W(IDX_W), .MW(MULT_W)) u_gray (
    .clk(clk), .rst_n(rst_n), .start(kick), .mult(gmult),
    .valid(g_valid), .flip(g_flip), .idx(g_idx), .inc(g_inc),
    .old_val(g_old), .parity(g_par), .last(g_last), .gc()
  );

  // binomial coefficient of the current code
  logic [BINOM_W-1:0] b_r, b_new, b_cur;
  binom_update #(.BW(BINOM_W), .MW(MULT_W)) u_binom (
    .b(b_r), .k(g_old), .m(gmult[g_idx]), .dec(!g_inc), .b_new(b_new)
  );
  assign b_cur = g_flip ? b_new : b_r;

  logic c_valid, c_last, c_par;
  logic [BINOM_W-1:0] c_b;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_r     <= '0;
      c_valid <= 1'b0;
      c_last  <= 1'b0;
      c_par   <= 1'b0;
      c_b     <= '0;
    end else begin
      if (kick) b_r <= BINOM_W'(1);
      else if (g_valid) b_r <= b_cur;
      c_valid <= g_valid;
      c_last  <= g_last;
      c_par   <= g_par;
      c_b     <= b_cur;
    end
  end

  cplx_t slot [N];
  rep_colsum #(.N(N)) u_cs (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .load_valid(load_fire), .load_idx(row_cnt), .load_row(row_data),
    .row_mult(rm_r), .col_mult(cm_r),
    .start(kick), .step(g_valid), .flip(g_flip), .flip_idx(g_idx),
    .flip_inc(g_inc), .slot(slot)
  );

  logic                      t_valid;
  logic [BINOM_W+1:0]        t_tag;
  cplx_w_t                   t_prod;
  product_tree #(.N(N), .TAG_W(BINOM_W + 2)) u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(c_valid), .in_tag({c_last, c_par, c_b}),
    .leaf(slot), .out_valid(t_valid), .out_tag(t_tag), .prod(t_prod)
  );

  rep_accum u_acc (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .in_valid(t_valid), .in_last(t_tag[BINOM_W+1]), .in_neg(t_tag[BINOM_W]),
    .in_b(t_tag[BINOM_W-1:0]), .prod(t_prod),
    .acc_re(perm_re), .acc_im(perm_im), .done(acc_done)
  );
endmodule
