// tb_glynn_perm_top: end-to-end test of the binary Glynn permanent engine.
//
// Runs random normalised complex matrices of several sizes through a
// reduced engine (N = 8) in single mode and, for two of them, in dual mode
// on both boards. Each result is compared with a double-precision
// reference computed directly from the definition, and the start-to-done
// cycle count with n + 2^(n-3) + 3 + 3*levels (2^(n-4) in dual mode). It
// also checks that row_ready throttles loading when row_valid has gaps.
module tb_glynn_perm_top;
  import perm_pkg::*;
  import perm_ref_pkg::*;

  localparam int N = 8;
  localparam int LEVELS = tree_levels(N);

  logic clk = 0, rst_n = 0;
  logic start = 0, dual_en = 0, board_id = 0, row_valid = 0;
  logic [IDX_W-1:0] n_in = '0;
  logic row_ready, busy, done;
  cplx_t row_data [N];
  logic signed [ACC_W-1:0] perm_re, perm_im;

  glynn_perm_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .n(n_in), .dual_en(dual_en),
    .board_id(board_id), .row_valid(row_valid), .row_ready(row_ready),
    .row_data(row_data), .busy(busy), .done(done),
    .perm_re(perm_re), .perm_im(perm_im)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_single = 0, n_dual = 0, n_gaps = 0;
  mat_t ar, ai;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic make_matrix(input int n);
    real scale;
    scale = 0.7 / n;
    for (int i = 0; i < N_MAX; i++)
      for (int j = 0; j < N_MAX; j++) begin
        ar[i][j] = scale * rnd();
        ai[i][j] = scale * rnd();
      end
  endtask

  task automatic run(input int n, input bit dual, input bit board, input bit gaps,
                     output real hr, output real hi, output int cycles);
    int r;
    @(negedge clk);
    n_in = IDX_W'(n); dual_en = dual; board_id = board; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    r = 0;
    while (r < n) begin
      row_valid = gaps ? ($urandom % 2 == 0) : 1'b1;
      // columns beyond n carry junk that must be ignored
      for (int j = 0; j < N; j++) begin
        row_data[j].re = (j < n) ? to_fix(ar[r][j]) : W_IN'($urandom);
        row_data[j].im = (j < n) ? to_fix(ai[r][j]) : W_IN'($urandom);
      end
      @(posedge clk);
      if (row_valid && row_ready) r++;
      else if (gaps) n_gaps++;
      @(negedge clk);
      cycles++;
    end
    row_valid = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    hr = wide_to_real(256'(perm_re), FRAC_MAX);
    hi = wide_to_real(256'(perm_im), FRAC_MAX);
  endtask

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
    real hr, hi, rr, ri, hr1, hi1;
    int cyc, exp_cyc;
    for (int j = 0; j < N; j++) row_data[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 3; n <= N; n++) begin
      for (int rep = 0; rep < 2; rep++) begin
        make_matrix(n);
        run(n, 0, 0, rep == 1, hr, hi, cyc);
        glynn_sum(ar, ai, n, -1, rr, ri);
        check_val($sformatf("n=%0d re", n), hr, rr);
        check_val($sformatf("n=%0d im", n), hi, ri);
        n_single++;
        if (rep == 0) begin
          exp_cyc = n + (1 << (n - 3)) + 3 + CMUL_LAT * LEVELS;
          checks++;
          if (cyc != exp_cyc) begin
            failures++;
            $display("FAIL n=%0d cycles %0d expected %0d", n, cyc, exp_cyc);
          end
        end
      end
    end
    // dual mode: each board's share, and their sum
    for (int n = 5; n <= N; n += 3) begin
      make_matrix(n);
      run(n, 1, 0, 0, hr, hi, cyc);
      exp_cyc = n + (1 << (n - 4)) + 3 + CMUL_LAT * LEVELS;
      checks++;
      if (cyc != exp_cyc) begin
        failures++;
        $display("FAIL dual n=%0d cycles %0d expected %0d", n, cyc, exp_cyc);
      end
      glynn_sum(ar, ai, n, 0, rr, ri);
      check_val("dual board0 re", hr, rr);
      check_val("dual board0 im", hi, ri);
      run(n, 1, 1, 0, hr1, hi1, cyc);
      glynn_sum(ar, ai, n, 1, rr, ri);
      check_val("dual board1 re", hr1, rr);
      check_val("dual board1 im", hi1, ri);
      glynn_sum(ar, ai, n, -1, rr, ri);
      check_val("dual sum re", hr + hr1, rr);
      check_val("dual sum im", hi + hi1, ri);
      n_dual++;
    end
    $display("single runs %0d, dual runs %0d, load stalls %0d", n_single, n_dual, n_gaps);
    checks++;
    if (n_single == 0 || n_dual == 0 || n_gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
