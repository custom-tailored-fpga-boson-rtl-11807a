// tb_rep_accum: checks the weighted accumulator of the repeated engine.
//
// Random products, 40-bit coefficients and signs are accumulated and
// compared with a wide-integer model; also checks clear and the done pulse.
module tb_rep_accum;
  import perm_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_last = 0, in_neg = 0;
  logic [BINOM_W-1:0] in_b = '0;
  cplx_w_t prod;
  logic signed [REP_ACC_W-1:0] acc_re, acc_im;
  logic done;

  rep_accum dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [255:0] er, ei;
    prod = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      er = 0; ei = 0;
      for (int t = 0; t < 40; t++) begin
        in_valid = (t == 39) || ($urandom % 4 != 0);
        in_last = (t == 39);
        in_neg = $urandom % 2;
        in_b = {8'($urandom), $urandom} >> ($urandom % 40);
        prod.re = $signed({$urandom, $urandom, $urandom, $urandom}) >>> 2;
        prod.im = $signed({$urandom, $urandom, $urandom, $urandom}) >>> 2;
        if (in_valid) begin
          if (in_neg) begin
            er -= 256'(prod.re) * $signed({1'b0, 255'(in_b)});
            ei -= 256'(prod.im) * $signed({1'b0, 255'(in_b)});
          end else begin
            er += 256'(prod.re) * $signed({1'b0, 255'(in_b)});
            ei += 256'(prod.im) * $signed({1'b0, 255'(in_b)});
          end
        end
        @(negedge clk);
        checks++;
        if (done != (t == 39)) begin failures++; $display("FAIL done t=%0d", t); end
      end
      in_valid = 0; in_last = 0;
      checks += 2;
      if (acc_re != REP_ACC_W'(er)) begin failures++; $display("FAIL re pass %0d", pass); end
      if (acc_im != REP_ACC_W'(ei)) begin failures++; $display("FAIL im pass %0d", pass); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
