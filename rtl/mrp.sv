// mrp: relational preprocessor with the iterative sorting node.
//
// Ten signals (nine pixels of a 3x3 window and one auxiliary channel) are
// sampled, sorted by iter_sorter in five iterations, and a code-controlled
// rank multiplexer delivers the signal of the selected rank.  The sorted
// vector is also brought out, so all ranks (all order-logic functions of the
// window) are available at once.
//
// Timing: pulse `start` with x_in valid; `done` rises six clocks later (one
// sampling beat and five iterations) and `out`/`ranks` are valid while done is
// high.  `rank_sel` is a one-hot code, bit r selecting rank r; it may change
// at any time, out follows combinationally.  `descending` selects direct (1)
// or inverse (0) order.
module mrp #(
  parameter int unsigned W = mip_pkg::PIX_W,
  parameter int unsigned N = mip_pkg::N_CH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         descending,
  input  logic [W-1:0] x_in     [N],
  input  logic [N-1:0] rank_sel,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] ranks    [N],
  output logic [W-1:0] out
);
  iter_sorter #(.W(W), .N(N)) u_sort (
    .clk, .rst_n, .start, .descending, .x_in, .busy, .done, .sorted(ranks));

  rank_mux #(.W(W), .N(N)) u_mux (
    .ranks, .y(rank_sel), .out);
endmodule
