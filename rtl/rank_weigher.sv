// rank_weigher: weighing-selection switching node.
//
// Forms F(Y) = sum_{r=0}^{N-1} Y(r) * X(r) over N signed inputs X (the ranked
// signals or their differences) with a control vector Y of signed fixed-point
// weights (WGT_FRAC fractional bits).  A one-hot Y makes it a plain rank
// multiplexer; other vectors give sums of ranks, differences of ranks,
// complements, averages and so on.
//
// The result is registered one clock after the inputs (out_valid follows
// in_valid).  `acc` is the exact sum, still with WGT_FRAC fractional bits;
// `pix` is that sum rounded to the nearest integer (halves up) and clamped to
// the pixel range 0..2^W_PIX-1, ready to be written to an output image.  The
// rounding and clamping are this design's choices.
module rank_weigher #(
  parameter int unsigned IN_W     = mip_pkg::PIX_W + 1,
  parameter int unsigned N        = mip_pkg::N_CH,
  parameter int unsigned WGT_W    = mip_pkg::WGT_W,
  parameter int unsigned WGT_FRAC = mip_pkg::WGT_FRAC,
  parameter int unsigned W_PIX    = mip_pkg::PIX_W,
  parameter int unsigned ACC_W    = mip_pkg::acc_width(IN_W, WGT_W, N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x   [N],
  input  logic signed [WGT_W-1:0] y   [N],
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] acc,
  output logic [W_PIX-1:0]        pix
);
  localparam logic signed [ACC_W-1:0] PIX_MAX = ACC_W'((1 << W_PIX) - 1);

  logic signed [ACC_W-1:0] sum;
  logic signed [ACC_W-1:0] rnd;
  logic [W_PIX-1:0]        sat;

  always_comb begin
    sum = '0;
    for (int r = 0; r < N; r++)
      sum += ACC_W'(x[r]) * ACC_W'(y[r]);
    // round half up, then drop the fraction
    if (WGT_FRAC > 0)
      rnd = (sum + ACC_W'(1 << (WGT_FRAC - 1))) >>> WGT_FRAC;
    else
      rnd = sum;
    if (rnd < 0)             sat = '0;
    else if (rnd > PIX_MAX)  sat = '1;
    else                     sat = rnd[W_PIX-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      acc       <= '0;
      pix       <= '0;
    end else begin
      out_valid <= in_valid;
      acc       <= sum;
      pix       <= sat;
    end
  end
endmodule
