// wave_sorter: conveyor (pipelined) homogeneous wave sorting unit.
//
// N channels pass through N_LAYERS layers of N/2 identical cmp_swap cells.
// Even layers pair channels (0,1)(2,3)...; odd layers pair (1,2)(3,4)... and
// close the ring with a cell on (0,N-1), so every layer has N/2 cells as in
// the design's regular wave structure.  The output is in descending order:
// out[0] holds the maximum.  N-1 layers sort any input whose last channel
// carries the lowest level (the auxiliary channel of the image processor);
// N layers sort arbitrary input.
//
// Each layer ends in a register, so a new vector can enter every clock
// (throughput one window per cycle) and the result appears N_LAYERS cycles
// later with out_valid.  The pipelining per layer is this design's choice.
// `swaps` exposes the comparator states of every layer, registered with the
// data of that layer (bit c of layer l = cell c of layer l exchanged).
module wave_sorter #(
  parameter int unsigned W        = mip_pkg::PIX_W,
  parameter int unsigned N        = mip_pkg::N_CH,
  parameter int unsigned N_LAYERS = N - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data  [N],
  output logic         out_valid,
  output logic [W-1:0] out_data [N],
  output logic [N/2-1:0] swaps  [N_LAYERS]
);
  logic [W-1:0]   stage [N_LAYERS+1][N];
  logic           vld   [N_LAYERS+1];

  assign stage[0] = in_data;
  assign vld[0]   = in_valid;

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    logic [W-1:0]   nxt [N];
    logic [N/2-1:0] sw;
    if (l % 2 == 0) begin : g_even
      for (genvar c = 0; c < N/2; c++) begin : g_cell
        cmp_swap #(.W(W)) u_cell (
          .a(stage[l][2*c]), .b(stage[l][2*c+1]), .descending(1'b1),
          .hi(nxt[2*c]), .lo(nxt[2*c+1]), .swapped(sw[c]));
      end
      if (N % 2 == 1) begin : g_pass
        assign nxt[N-1] = stage[l][N-1];
      end
    end else begin : g_odd
      for (genvar c = 0; c < (N-1)/2; c++) begin : g_cell
        cmp_swap #(.W(W)) u_cell (
          .a(stage[l][2*c+1]), .b(stage[l][2*c+2]), .descending(1'b1),
          .hi(nxt[2*c+1]), .lo(nxt[2*c+2]), .swapped(sw[c]));
      end
      if (N % 2 == 0) begin : g_ring
        // ring cell closing the layer: channel 0 against channel N-1
        cmp_swap #(.W(W)) u_ring (
          .a(stage[l][0]), .b(stage[l][N-1]), .descending(1'b1),
          .hi(nxt[0]), .lo(nxt[N-1]), .swapped(sw[N/2-1]));
      end else begin : g_pass
        assign nxt[0] = stage[l][0];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[l+1] <= 1'b0;
        for (int i = 0; i < N; i++) stage[l+1][i] <= '0;
        swaps[l] <= '0;
      end else begin
        vld[l+1]   <= vld[l];
        stage[l+1] <= nxt;
        swaps[l]   <= sw;
      end
    end
  end

  assign out_valid = vld[N_LAYERS];
  assign out_data  = stage[N_LAYERS];
endmodule
