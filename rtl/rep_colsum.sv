// rep_colsum: column sums for the repeated row/column permanent.
//
// Keeps the m x m matrix (up to N x N) in flip-flops together with the
// column sums s_j = sum_k (M_k - 2 Delta_k) a_kj. While rows stream in, row
// k is added M_k times (M_k * a_kj) into the base sums, which are the sums
// for Delta = 0. start copies them into the running sums; afterwards every
// Gray step that raises Delta_k subtracts 2 a_kj from all column sums and
// every step that lowers it adds 2 a_kj back.
// The product over columns of s_j^(N_j) is formed by feeding column j into
// N_j consecutive leaves ("photon slots") of the product tree: slot p takes
// the column c with N_0 + .. + N_(c-1) <= p < N_0 + .. + N_c, and slots at or
// beyond the photon count are one. The slot map is registered at start.
// Outputs are registered: the slots for a Gray step appear one cycle after
// the step. The sums follow the document's formula; the slot expansion and
// the integer multiply at load are this design's choices.
module rep_colsum
  import perm_pkg::*;
#(
  parameter int N = N_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             load_valid,
  input  logic [IDX_W-1:0] load_idx,
  input  cplx_t            load_row [N],
  input  logic [MULT_W-1:0] row_mult [N],
  input  logic [MULT_W-1:0] col_mult [N],
  input  logic             start,
  input  logic             step,       // a Gray code is valid this cycle
  input  logic             flip,
  input  logic [IDX_W-1:0] flip_idx,
  input  logic             flip_inc,
  output cplx_t            slot [N]
);
  cplx_t mat [N][N];
  cplx_t base [N];
  cplx_t s [N];
  cplx_t s_next [N];
  logic [IDX_W-1:0] slot_col [N];
  logic             slot_on  [N];

  always_ff @(posedge clk) begin
    if (load_valid)
      for (int j = 0; j < N; j++) mat[load_idx][j] <= load_row[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) base[j] <= '0;
    end else if (clear) begin
      for (int j = 0; j < N; j++) base[j] <= '0;
    end else if (load_valid) begin
      for (int j = 0; j < N; j++) begin
        base[j].re <= base[j].re + load_row[j].re * W_IN'(row_mult[load_idx]);
        base[j].im <= base[j].im + load_row[j].im * W_IN'(row_mult[load_idx]);
      end
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) begin
      s_next[j] = s[j];
      if (flip) begin
        if (flip_inc) begin
          s_next[j].re = s[j].re - (mat[flip_idx][j].re <<< 1);
          s_next[j].im = s[j].im - (mat[flip_idx][j].im <<< 1);
        end else begin
          s_next[j].re = s[j].re + (mat[flip_idx][j].re <<< 1);
          s_next[j].im = s[j].im + (mat[flip_idx][j].im <<< 1);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start) s <= base;
    else if (step) s <= s_next;
  end

  // photon slot map
  logic [IDX_W-1:0] map_col [N];
  logic             map_on  [N];
  always_comb begin
    for (int p = 0; p < N; p++) begin
      int cum;
      cum = 0;
      map_col[p] = '0;
      for (int j = 0; j < N; j++) begin
        cum += int'(col_mult[j]);
        if (cum <= p) map_col[p] = IDX_W'(j + 1);
      end
      map_on[p] = p < cum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) begin
        slot_col[p] <= '0;
        slot_on[p]  <= 1'b0;
      end
    end else if (start) begin
      slot_col <= map_col;
      slot_on  <= map_on;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) slot[p] <= '0;
    end else begin
      for (int p = 0; p < N; p++)
        if (slot_on[p]) slot[p] <= s_next[slot_col[p]];
        else            slot[p] <= '{re: ONE_IN, im: '0};
    end
  end
endmodule
