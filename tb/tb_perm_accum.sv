// tb_perm_accum: checks the signed four-stream accumulator.
//
// Random products with random Gray parities are accumulated; the expected
// sum applies the sign (-1)^(parity + popcount(prefix)) to each stream.
// Also checks clear, that cycles without in_valid add nothing, and the done
// pulse one cycle after in_last.
module tb_perm_accum;
  import perm_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_last = 0, in_neg = 0;
  cplx_w_t prod [NKERN];
  logic signed [ACC_W-1:0] acc_re, acc_im;
  logic done;

  perm_accum dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W_MAX-1:0] rndw();
    logic signed [W_MAX-1:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v >>> 2;   // magnitude below one
  endfunction

  initial begin
    logic signed [ACC_W-1:0] er, ei;
    for (int p = 0; p < NKERN; p++) prod[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      er = 0; ei = 0;
      for (int t = 0; t < 50; t++) begin
        in_valid = ($urandom % 4 != 0);
        in_neg = $urandom % 2;
        in_last = (t == 49);
        if (t == 49) in_valid = 1;
        for (int p = 0; p < NKERN; p++) begin
          prod[p].re = rndw();
          prod[p].im = rndw();
          if (in_valid) begin
            if (in_neg ^ ($countones(p) % 2 == 1)) begin
              er -= ACC_W'(prod[p].re); ei -= ACC_W'(prod[p].im);
            end else begin
              er += ACC_W'(prod[p].re); ei += ACC_W'(prod[p].im);
            end
          end
        end
        @(negedge clk);
        checks++;
        if (done != (t == 49)) begin failures++; $display("FAIL done t=%0d", t); end
      end
      in_valid = 0; in_last = 0;
      checks += 2;
      if (acc_re != er) begin failures++; $display("FAIL re pass %0d", pass); end
      if (acc_im != ei) begin failures++; $display("FAIL im pass %0d", pass); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
