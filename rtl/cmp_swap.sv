// cmp_swap: the basic relational cell of the sorting nodes (a two-input,
// two-output max/min selector, the digital counterpart of the
// selector-rank disjunctive-conjunctive element).
//
// It compares a and b and routes the larger one to `hi` and the smaller one to
// `lo` when `descending` is 1; with `descending` at 0 the routing is reversed,
// which gives inverse (ascending) order in a network built from these cells.
// `swapped` is the comparator state: 1 when the inputs were exchanged.  Equal
// inputs are never exchanged.  Purely combinational.
module cmp_swap #(
  parameter int unsigned W = mip_pkg::PIX_W
) (
  input  logic [W-1:0] a,          // channel on the upper (lower index) line
  input  logic [W-1:0] b,          // channel on the lower line
  input  logic         descending, // 1: max to hi, 0: min to hi
  output logic [W-1:0] hi,
  output logic [W-1:0] lo,
  output logic         swapped
);
  always_comb begin
    swapped = descending ? (b > a) : (a > b);
    hi      = swapped ? b : a;
    lo      = swapped ? a : b;
  end
endmodule
