// gray_counter: reflected binary Gray code counter over a run-time number of bits.
//
// After a start pulse the counter walks through the 2^nbits codes of the
// reflected binary Gray code g(t) = t ^ (t >> 1), one code per cycle. For
// every code it reports which single bit changed relative to the previous
// code (idx, the number of trailing zeros of t), whether that bit became one
// (set) and the parity of the code (its number of ones, equal to t mod 2).
// The first code (all zeros) is reported with flip = 0. last marks the final
// code, after which the counter stops until the next start.
//
// Timing: valid rises the cycle after start and stays high for exactly
// 2^nbits cycles. nbits may be 0 (a single code). The Gray code itself is
// the document's; the counter structure is this design's.
module gray_counter #(
  parameter int CW    = 40,  // widest code
  parameter int IDX_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IDX_W-1:0] nbits,
  output logic             valid,
  output logic             flip,
  output logic [IDX_W-1:0] idx,
  output logic             set,
  output logic             parity,
  output logic             last
);
  logic [CW-1:0] cnt;
  logic [CW:0]   top;
  logic [CW-1:0] gray;

  assign top  = ((CW+1)'(1) << nbits) - (CW+1)'(1);
  assign gray = cnt ^ (cnt >> 1);

  always_comb begin
    idx = '0;
    for (int b = CW - 1; b >= 0; b--)
      if (cnt[b]) idx = IDX_W'(b);
  end

  assign flip   = valid && (cnt != '0);
  assign set    = gray[idx];
  assign parity = cnt[0];
  assign last   = valid && ((CW+1)'(cnt) == top);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      cnt   <= '0;
    end else if (start) begin
      valid <= 1'b1;
      cnt   <= '0;
    end else if (valid) begin
      if (last) valid <= 1'b0;
      else      cnt   <= cnt + 1'b1;
    end
  end
endmodule
