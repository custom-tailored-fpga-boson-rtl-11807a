// tb_colsum_init: checks the initial column-sum accumulator.
//
// Streams 8 random rows (with gaps) into a 4-column block with n = 6, so
// rows 6 and 7 must be ignored, and compares the sums with a model; then
// clears and repeats with n = 8.
module tb_colsum_init;
  import perm_pkg::*;
  localparam int Q = 4;
  logic clk = 0, rst_n = 0, clear = 0, row_valid = 0;
  logic [IDX_W-1:0] row_idx = '0, n = '0;
  cplx_t row [Q];
  cplx_t sum [Q];

  colsum_init #(.Q(Q)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W_IN-1:0] er [Q], ei [Q];
    for (int j = 0; j < Q; j++) row[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      clear = 1; n = (pass == 0) ? 6 : 8;
      @(negedge clk);
      clear = 0;
      for (int j = 0; j < Q; j++) begin er[j] = '0; ei[j] = '0; end
      for (int r = 0; r < 8; r++) begin
        row_valid = 0;
        @(negedge clk);
        row_idx = IDX_W'(r);
        row_valid = 1;
        for (int j = 0; j < Q; j++) begin
          row[j].re = {{8{1'b0}}, 56'($urandom)} - (64'sd1 <<< 55);
          row[j].im = {{8{1'b0}}, 56'($urandom)} - (64'sd1 <<< 55);
          if (r < int'(n)) begin er[j] += row[j].re; ei[j] += row[j].im; end
        end
        @(negedge clk);
        row_valid = 0;
      end
      @(negedge clk);
      for (int j = 0; j < Q; j++) begin
        checks += 2;
        if (sum[j].re != er[j] || sum[j].im != ei[j]) begin
          failures++;
          $display("FAIL pass %0d col %0d", pass, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
