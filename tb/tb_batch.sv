// tb_batch: batches of back-to-back permanents on the full-size design.
//
// Binary engine: a batch of 8 random 8 x 8 matrices, each started on the
// cycle after the previous done, so the batch must take exactly
// 8 * (8 + 2^5 + 3 + 3*levels + 1) cycles. Repeated engine: a batch of 6
// operations with the row multiplicities held fixed and the column
// multiplicities changing from one operation to the next (the matrix is
// re-streamed each time). Every result is compared with a double-precision
// reference; the number of operations and the batch time are checked.
module tb_batch;
  import perm_pkg::*;
  import perm_ref_pkg::*;

  localparam int N = N_MAX;
  localparam int LEVELS = tree_levels(N);

  logic clk = 0, rst_n = 0;
  logic g_start = 0, g_dual_en = 0, g_board_id = 0, g_row_valid = 0;
  logic [IDX_W-1:0] g_n = '0;
  logic g_row_ready, g_busy, g_done;
  cplx_t g_row_data [N];
  logic signed [ACC_W-1:0] g_perm_re, g_perm_im;
  logic r_start = 0, r_row_valid = 0;
  logic [IDX_W-1:0] r_m = '0;
  logic [MULT_W-1:0] r_row_mult [N];
  logic [MULT_W-1:0] r_col_mult [N];
  logic r_row_ready, r_busy, r_done;
  cplx_t r_row_data [N];
  logic signed [REP_ACC_W-1:0] r_perm_re, r_perm_im;

  boson_sampling_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  mat_t ar, ai;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd();
    int u;
    u = int'($urandom % 2001) - 1000;
    return u / 1000.0;
  endfunction

  task automatic check_val(input string what, input real got, input real exp);
    real tol;
    tol = 1e-12 + 1e-9 * ((exp < 0) ? -exp : exp);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s got %g expected %g", what, got, exp);
    end
  endtask

  initial begin
    int cyc, ops, exp_cyc;
    real rr, ri;
    int M [N_MAX], Nm [N_MAX];
    for (int j = 0; j < N; j++) begin
      g_row_data[j] = '0; r_row_data[j] = '0; r_row_mult[j] = '0; r_col_mult[j] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // binary batch: batch size = matrix size = 8
    ops = 0;
    cyc = 0;
    @(negedge clk);
    for (int b = 0; b < 8; b++) begin
      for (int i = 0; i < N_MAX; i++)
        for (int j = 0; j < N_MAX; j++) begin
          ar[i][j] = 0.7 / 8 * rnd();
          ai[i][j] = 0.7 / 8 * rnd();
        end
      g_n = 8; g_start = 1;
      @(negedge clk);
      g_start = 0;
      cyc++;
      for (int r = 0; r < 8; r++) begin
        g_row_valid = 1;
        for (int j = 0; j < N; j++) begin
          g_row_data[j].re = to_fix(ar[r][j]);
          g_row_data[j].im = to_fix(ai[r][j]);
        end
        @(negedge clk);
        cyc++;
      end
      g_row_valid = 0;
      while (!g_done) begin
        @(negedge clk);
        cyc++;
      end
      // the engine is idle again on the cycle after done
      @(negedge clk);
      cyc++;
      glynn_sum(ar, ai, 8, -1, rr, ri);
      check_val($sformatf("batch %0d re", b), wide_to_real(256'(g_perm_re), FRAC_MAX), rr);
      check_val($sformatf("batch %0d im", b), wide_to_real(256'(g_perm_im), FRAC_MAX), ri);
      ops++;
    end
    exp_cyc = 8 * (8 + (1 << 5) + 3 + CMUL_LAT * LEVELS + 1);
    checks++;
    if (cyc != exp_cyc || ops != 8) begin
      failures++;
      $display("FAIL binary batch %0d ops in %0d cycles, expected 8 in %0d", ops, cyc, exp_cyc);
    end

    // repeated batch: fixed rows (2, 1, 2), changing column multiplicities
    for (int k = 0; k < N_MAX; k++) begin M[k] = 0; Nm[k] = 0; end
    M[0] = 2; M[1] = 1; M[2] = 2;
    for (int i = 0; i < N_MAX; i++)
      for (int j = 0; j < N_MAX; j++) begin
        ar[i][j] = 0.7 / 5 * rnd();
        ai[i][j] = 0.7 / 5 * rnd();
      end
    ops = 0;
    for (int b = 0; b < 6; b++) begin
      int n;
      // a different split of 5 photons over the 3 columns each time
      Nm[0] = b % 3; Nm[1] = (b / 3) + 1; Nm[2] = 5 - Nm[0] - Nm[1];
      rep_expand_sum(ar, ai, 3, M, Nm, rr, ri, n);
      r_m = 3;
      for (int k = 0; k < N; k++) begin
        r_row_mult[k] = MULT_W'(M[k]);
        r_col_mult[k] = MULT_W'(Nm[k]);
      end
      r_start = 1;
      @(negedge clk);
      r_start = 0;
      for (int r = 0; r < 3; r++) begin
        r_row_valid = 1;
        for (int j = 0; j < N; j++) begin
          r_row_data[j].re = (j < 3) ? to_fix(ar[r][j]) : '0;
          r_row_data[j].im = (j < 3) ? to_fix(ai[r][j]) : '0;
        end
        @(negedge clk);
      end
      r_row_valid = 0;
      while (!r_done) @(negedge clk);
      @(negedge clk);
      check_val($sformatf("rep batch %0d re", b), wide_to_real(256'(r_perm_re), FRAC_MAX), rr);
      check_val($sformatf("rep batch %0d im", b), wide_to_real(256'(r_perm_im), FRAC_MAX), ri);
      ops++;
    end
    checks++;
    if (ops != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
