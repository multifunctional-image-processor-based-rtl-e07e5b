// shd_bank: multichannel sample-and-hold device of the iterative sorting node.
//
// N registers, one per channel.  On a clock with `sample` high they take the
// external inputs (the sampling beat); on a clock with `rewrite` high they take
// the outputs of the cell arrays fed back to them (the rewriting beat);
// otherwise they hold.  `sample` has priority.  Reset clears every channel.
module shd_bank #(
  parameter int unsigned W = mip_pkg::PIX_W,
  parameter int unsigned N = mip_pkg::N_CH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample,
  input  logic         rewrite,
  input  logic [W-1:0] x_in  [N],   // external signals
  input  logic [W-1:0] fb_in [N],   // signals returned by the cell arrays
  output logic [W-1:0] q     [N]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (sample) begin
      q <= x_in;
    end else if (rewrite) begin
      q <= fb_in;
    end
  end
endmodule
