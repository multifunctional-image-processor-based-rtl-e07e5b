// rank_mux: code-controlled programmable rank multiplexer.
//
// The control code y has one bit per rank; the output is the ranked signal
// whose code bit is set.  With the ranks in descending order, y = 1 at rank 0
// gives the n-place disjunction (maximum), at rank N-1 the conjunction
// (minimum), in the middle the median.  If several bits are set, the selected
// values are OR-ed, as in an AND-OR switch; with no bit set the output is 0.
// Purely combinational.
module rank_mux #(
  parameter int unsigned W = mip_pkg::PIX_W,
  parameter int unsigned N = mip_pkg::N_CH
) (
  input  logic [W-1:0] ranks [N],
  input  logic [N-1:0] y,        // one-hot rank select code
  output logic [W-1:0] out
);
  always_comb begin
    out = '0;
    for (int r = 0; r < N; r++)
      if (y[r]) out |= ranks[r];
  end
endmodule
