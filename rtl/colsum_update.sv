// colsum_update: Gray-code column-sum kernel for one group of Q columns.
//
// The kernel keeps its Q columns of the matrix in flip-flops (all N rows)
// and, for each of the NKERN = 4 delta prefixes, the Q column sums
// s_j = sum_i delta_i a_ij. Row 0 is the anchor (delta = +1); rows 1 and 2
// form the prefix p (bit 1 of p negates row 1, bit 0 negates row 2). In dual
// mode row 3 is fixed as well, to -1 on board 1 and +1 on board 0. The
// remaining rows follow the kernel's own Gray-code counter: when Gray bit b
// (row b+3, or b+4 in dual mode) becomes one, 2a_ij is subtracted from every
// prefix's sum; when it returns to zero, 2a_ij is added back.
//
// Interface: load_valid/load_idx/load_row write one matrix row; start (one
// cycle, after the base sums from colsum_init are complete) initialises the
// sums and starts the counter. out_cs carries the four prefixes' Q column
// sums for one Gray code per cycle, with out_parity (parity of the Gray
// code, i.e. its delta sign) and out_last. Columns at or beyond n are output
// as exactly one so that they do not change the product. The first output
// follows start by two cycles; there are 2^(n-3) outputs (2^(n-4) in dual
// mode). The structure follows the document's figure of four column-sum
// kernels feeding four product kernels; the numbering of prefixes, the
// dual-mode row and the padding with one are this design's choices.
module colsum_update
  import perm_pkg::*;
#(
  parameter int N   = N_MAX,
  parameter int Q   = N_MAX / NKERN,
  parameter int KID = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_valid,
  input  logic [IDX_W-1:0] load_idx,
  input  cplx_t            load_row [Q],
  input  cplx_t            base [Q],
  input  logic             start,
  input  logic [IDX_W-1:0] n,
  input  logic             dual_en,
  input  logic             board_id,
  output logic             out_valid,
  output logic             out_last,
  output logic             out_parity,
  output cplx_t            out_cs [NKERN][Q]
);
  cplx_t mat [N][Q];
  cplx_t s   [NKERN][Q];
  cplx_t s_next [NKERN][Q];

  logic [IDX_W-1:0] first_row, nbits;
  assign first_row = dual_en ? IDX_W'(4) : IDX_W'(3);
  assign nbits     = (n > first_row) ? n - first_row : '0;

  logic             g_valid, g_flip, g_set, g_parity, g_last;
  logic [IDX_W-1:0] g_idx, g_row;

  gray_counter #(.CW(N), .IDX_W(IDX_W)) u_gray (
    .clk(clk), .rst_n(rst_n), .start(start), .nbits(nbits),
    .valid(g_valid), .flip(g_flip), .idx(g_idx), .set(g_set),
    .parity(g_parity), .last(g_last)
  );
  assign g_row = g_idx + first_row;

  always_ff @(posedge clk) begin
    if (load_valid)
      for (int j = 0; j < Q; j++) mat[load_idx][j] <= load_row[j];
  end

  // sums after the current Gray step
  always_comb begin
    for (int p = 0; p < NKERN; p++)
      for (int j = 0; j < Q; j++) begin
        s_next[p][j] = s[p][j];
        if (g_flip) begin
          if (g_set) begin
            s_next[p][j].re = s[p][j].re - (mat[g_row][j].re <<< 1);
            s_next[p][j].im = s[p][j].im - (mat[g_row][j].im <<< 1);
          end else begin
            s_next[p][j].re = s[p][j].re + (mat[g_row][j].re <<< 1);
            s_next[p][j].im = s[p][j].im + (mat[g_row][j].im <<< 1);
          end
        end
      end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      for (int p = 0; p < NKERN; p++)
        for (int j = 0; j < Q; j++) begin
          s[p][j].re <= base[j].re
                        - (p[1] ? (mat[1][j].re <<< 1) : '0)
                        - (p[0] ? (mat[2][j].re <<< 1) : '0)
                        - ((dual_en && board_id) ? (mat[3][j].re <<< 1) : '0);
          s[p][j].im <= base[j].im
                        - (p[1] ? (mat[1][j].im <<< 1) : '0)
                        - (p[0] ? (mat[2][j].im <<< 1) : '0)
                        - ((dual_en && board_id) ? (mat[3][j].im <<< 1) : '0);
        end
    end else if (g_valid) begin
      s <= s_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_last   <= 1'b0;
      out_parity <= 1'b0;
      for (int p = 0; p < NKERN; p++)
        for (int j = 0; j < Q; j++) out_cs[p][j] <= '0;
    end else begin
      out_valid  <= g_valid;
      out_last   <= g_last;
      out_parity <= g_parity;
      for (int p = 0; p < NKERN; p++)
        for (int j = 0; j < Q; j++)
          if (KID * Q + j < int'(n)) out_cs[p][j] <= s_next[p][j];
          else                       out_cs[p][j] <= '{re: ONE_IN, im: '0};
    end
  end
endmodule
