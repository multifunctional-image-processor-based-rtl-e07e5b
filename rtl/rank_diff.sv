// rank_diff: rank-difference former.
//
// From the ranked signals Ds(0) >= Ds(1) >= ... >= Ds(N-1) and the upper
// reference level D it forms
//   Dr(0) = D - Ds(0),   Dr(r) = Ds(r-1) - Ds(r)  for r = 1..N-1.
// With the auxiliary channel at 0 (Ds(N-1) = 0) the last difference equals the
// lowest pixel rank, and the N differences always add up to D.  Summing the
// first k+1 differences gives D - Ds(k), the complement of rank k.
// The differences are signed and one bit wider than a pixel, so an input that
// is not ordered, or a D below the maximum, yields a negative value instead of
// wrapping.  Purely combinational.
module rank_diff #(
  parameter int unsigned W = mip_pkg::PIX_W,
  parameter int unsigned N = mip_pkg::N_CH
) (
  input  logic [W-1:0]        d_ref,     // upper level D
  input  logic [W-1:0]        ds [N],    // ranked signals, descending
  output logic signed [W:0]   dr [N]     // rank differences
);
  always_comb begin
    dr[0] = $signed({1'b0, d_ref}) - $signed({1'b0, ds[0]});
    for (int r = 1; r < N; r++)
      dr[r] = $signed({1'b0, ds[r-1]}) - $signed({1'b0, ds[r]});
  end
endmodule
