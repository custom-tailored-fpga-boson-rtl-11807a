// tb_colsum_update: checks the Gray-code column-sum kernel.
//
// A kernel with N = 8 rows and Q = 3 columns at position KID = 2 (global
// columns 6..8, so for n < 9 some columns are padding) is loaded with a
// random integer matrix. For every output the four prefixes' column sums
// are recomputed from scratch from the Gray code index, in single mode and
// in dual mode on both boards, and the number of outputs is checked.
module tb_colsum_update;
  import perm_pkg::*;
  localparam int N = 8, Q = 3, KID = 2;
  logic clk = 0, rst_n = 0, load_valid = 0, start = 0, dual_en = 0, board_id = 0;
  logic [IDX_W-1:0] load_idx = '0, n = '0;
  cplx_t load_row [Q];
  cplx_t base [Q];
  logic out_valid, out_last, out_parity;
  cplx_t out_cs [NKERN][Q];

  colsum_update #(.N(N), .Q(Q), .KID(KID)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [W_IN-1:0] mr [N][Q], mi [N][Q];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nn, input bit dual, input bit board);
    int t, first, nb;
    @(negedge clk);
    n = IDX_W'(nn); dual_en = dual; board_id = board;
    for (int i = 0; i < N; i++) begin
      load_valid = 1; load_idx = IDX_W'(i);
      for (int j = 0; j < Q; j++) load_row[j] = '{re: mr[i][j], im: mi[i][j]};
      @(negedge clk);
    end
    load_valid = 0;
    for (int j = 0; j < Q; j++) begin
      base[j] = '0;
      for (int i = 0; i < nn; i++) begin
        base[j].re += mr[i][j];
        base[j].im += mi[i][j];
      end
    end
    start = 1;
    @(negedge clk);
    start = 0;
    first = dual ? 4 : 3;
    nb = nn - first;
    t = 0;
    while (!out_valid) @(negedge clk);
    while (out_valid) begin
      int g;
      g = t ^ (t >> 1);
      checks++;
      if (out_parity != ($countones(g) % 2 == 1) || out_last != (t == (1 << nb) - 1)) begin
        failures++;
        $display("FAIL parity/last t=%0d", t);
      end
      for (int p = 0; p < NKERN; p++)
        for (int j = 0; j < Q; j++) begin
          logic signed [W_IN-1:0] er, ei;
          er = 0; ei = 0;
          for (int i = 0; i < nn; i++) begin
            bit neg;
            if (i == 0) neg = 0;
            else if (i == 1) neg = p[1];
            else if (i == 2) neg = p[0];
            else if (i == 3 && dual) neg = board;
            else neg = g[i - first];
            if (neg) begin er -= mr[i][j]; ei -= mi[i][j]; end
            else     begin er += mr[i][j]; ei += mi[i][j]; end
          end
          if (KID * Q + j >= nn) begin er = ONE_IN; ei = 0; end
          checks++;
          if (out_cs[p][j].re != er || out_cs[p][j].im != ei) begin
            failures++;
            $display("FAIL n=%0d dual=%0d t=%0d p=%0d j=%0d", nn, dual, t, p, j);
          end
        end
      t++;
      @(negedge clk);
    end
    checks++;
    if (t != (1 << nb)) begin failures++; $display("FAIL count %0d", t); end
  endtask

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < Q; j++) begin
        mr[i][j] = W_IN'(int'($urandom % 200001) - 100000);
        mi[i][j] = W_IN'(int'($urandom % 200001) - 100000);
      end
    for (int j = 0; j < Q; j++) load_row[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(8, 0, 0);
    run(7, 0, 0);
    run(8, 1, 0);
    run(8, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
