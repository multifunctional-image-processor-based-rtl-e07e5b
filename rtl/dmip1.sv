// dmip1: image processor with ten parallel inputs and one output.
//
// The nine pixels of a window (plus the auxiliary channel, normally 0) are
// presented in parallel, sorted by the conveyor wave sorter (N-1 layers,
// descending) and one rank is chosen by a one-hot rank code through the
// rank multiplexer.  This is the parallel-input, single-output variant of the
// processor; the window search and the weighing-selection outputs of dmip3
// are absent.
//
// Timing: one input vector per clock; the selected rank appears with
// out_valid N_LAYERS + 1 clocks after in_valid (nine sorting layers and the
// output register).  rank_sel is read as the sorted vector leaves the
// sorter; keep it steady while results are wanted.
module dmip1 #(
  parameter int unsigned W = mip_pkg::PIX_W,
  parameter int unsigned N = mip_pkg::N_CH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x_in [N],
  input  logic [N-1:0] rank_sel,   // one-hot rank code, bit 0 = maximum
  output logic         out_valid,
  output logic [W-1:0] out
);
  localparam int unsigned DEPTH = N - 1;

  logic           srt_valid;
  logic [W-1:0]   ds [N];
  logic [W-1:0]   sel;
  logic [N/2-1:0] swaps [DEPTH];   // comparator states, not used here

  wave_sorter #(.W(W), .N(N), .N_LAYERS(DEPTH)) u_sort (
    .clk, .rst_n, .in_valid, .in_data(x_in), .out_valid(srt_valid), .out_data(ds), .swaps);

  rank_mux #(.W(W), .N(N)) u_mux (.ranks(ds), .y(rank_sel), .out(sel));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= srt_valid;
      out       <= sel;
    end
  end
endmodule
