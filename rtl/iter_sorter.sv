// iter_sorter: iterative sorting node.
//
// A multichannel sample-and-hold bank (shd_bank) feeds two linear arrays of
// cmp_swap cells.  Array A pairs channels (0,1)(2,3)..., array B pairs
// (1,2)(3,4)... and closes the ring with a cell on (0,N-1).  The output of
// array B is rewritten into the bank, so one clock performs one iteration of
// two compare-exchange layers.  ITERS = N/2 iterations give N layers, enough
// to sort any N inputs; for the ten-channel node that is five iterations.
//
// Timing: `start` (while idle) samples x_in on the next clock edge; then ITERS
// rewriting clocks follow and `done` rises, ITERS+1 clocks after start.  The
// sorted vector stays on `sorted` (and `done` stays high) until the next
// start.  `descending` = 1 gives direct order (sorted[0] is the maximum),
// 0 gives inverse order (sorted[0] is the minimum); it must be held while
// the node is busy.  `start` while busy is ignored.
module iter_sorter #(
  parameter int unsigned W     = mip_pkg::PIX_W,
  parameter int unsigned N     = mip_pkg::N_CH,
  parameter int unsigned ITERS = (N + 1) / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         descending,
  input  logic [W-1:0] x_in   [N],
  output logic         busy,
  output logic         done,
  output logic [W-1:0] sorted [N]
);
  localparam int unsigned CW = $clog2(ITERS + 1);

  logic [W-1:0] q   [N];
  logic [W-1:0] la  [N];   // after array A
  logic [W-1:0] lb  [N];   // after array B
  logic [CW-1:0] cnt;
  logic          sample, rewrite;

  assign sample  = start && !busy;
  assign rewrite = busy;

  shd_bank #(.W(W), .N(N)) u_shd (
    .clk, .rst_n, .sample, .rewrite, .x_in, .fb_in(lb), .q);

  // array A: (0,1)(2,3)...
  for (genvar c = 0; c < N/2; c++) begin : g_a
    cmp_swap #(.W(W)) u_cell (
      .a(q[2*c]), .b(q[2*c+1]), .descending,
      .hi(la[2*c]), .lo(la[2*c+1]), .swapped());
  end
  if (N % 2 == 1) begin : g_a_pass
    assign la[N-1] = q[N-1];
  end

  // array B: (1,2)(3,4)... plus the ring cell (0,N-1)
  for (genvar c = 0; c < (N-1)/2; c++) begin : g_b
    cmp_swap #(.W(W)) u_cell (
      .a(la[2*c+1]), .b(la[2*c+2]), .descending,
      .hi(lb[2*c+1]), .lo(lb[2*c+2]), .swapped());
  end
  if (N % 2 == 0) begin : g_b_ring
    cmp_swap #(.W(W)) u_ring (
      .a(la[0]), .b(la[N-1]), .descending,
      .hi(lb[0]), .lo(lb[N-1]), .swapped());
  end else begin : g_b_pass
    assign lb[0] = la[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else if (sample) begin
      busy <= 1'b1;
      done <= 1'b0;
      cnt  <= CW'(ITERS);
    end else if (busy) begin
      cnt <= cnt - 1'b1;
      if (cnt == CW'(1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign sorted = q;

  // the order must not change while an iteration is under way
  property p_dir_stable;
    @(posedge clk) disable iff (!rst_n) busy |-> $stable(descending);
  endproperty
  a_dir_stable: assert property (p_dir_stable);
endmodule
