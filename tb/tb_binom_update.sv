// tb_binom_update: checks the incremental binomial update with magic-number
// division.
//
// For every multiplicity m = 1..40 and every Delta it checks the rising and
// falling update of b = X * C(m, Delta) for random factors X (keeping b
// within 40 bits), against binomials computed by Pascal's rule.
module tb_binom_update;
  localparam int BW = 40, MW = 6;
  logic [BW-1:0] b, b_new;
  logic [MW-1:0] k, m;
  logic dec;

  binom_update #(.BW(BW), .MW(MW)) dut (.*);

  int checks = 0, failures = 0;
  longint C [41][41];

  initial begin
    for (int i = 0; i <= 40; i++)
      for (int j = 0; j <= 40; j++)
        C[i][j] = (j == 0) ? 1 : (i == 0) ? 0 : C[i-1][j-1] + C[i-1][j];
    for (int mm = 1; mm <= 40; mm++)
      for (int d = 0; d <= mm; d++)
        for (int r = 0; r < 3; r++) begin
          longint x, lim;
          lim = (longint'(1) << BW) / (C[mm][d] > C[mm][(d < mm) ? d + 1 : d] ?
                                        C[mm][d] : C[mm][(d < mm) ? d + 1 : d]);
          lim = (d > 0 && C[mm][d-1] > C[mm][d]) ? (longint'(1) << BW) / C[mm][d-1] : lim;
          x = (r == 0 || lim <= 1) ? 1 : 1 + longint'($urandom) % (lim - 1);
          m = MW'(mm); k = MW'(d); b = BW'(x * C[mm][d]);
          if (d < mm) begin
            dec = 0;
            #1;
            checks++;
            if (b_new != BW'(x * C[mm][d+1])) begin
              failures++; $display("FAIL rise m=%0d d=%0d", mm, d);
            end
          end
          if (d > 0) begin
            dec = 1;
            #1;
            checks++;
            if (b_new != BW'(x * C[mm][d-1])) begin
              failures++; $display("FAIL fall m=%0d d=%0d", mm, d);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
