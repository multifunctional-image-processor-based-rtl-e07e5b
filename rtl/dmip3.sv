// dmip3: digital multifunctional image processor with serial input and two
// outputs (rank output and rank-difference output).
//
// Data path, one pixel per clock:
//   window_buffer -> wave_sorter (9 window pixels + auxiliary 0, 9 layers)
//   -> rank_diff -> two rank_weigher switching nodes.
// Output 1 is Fs(Ys) = sum_r Ys(r) * Ds(r) over the ranks Ds (descending,
// Ds(9) = 0); output 2 is F(Yd) = sum_r Yd(r) * Dr(r) over the rank
// differences Dr(0) = D - Ds(0), Dr(r) = Ds(r-1) - Ds(r).  A one-hot Ys
// selects one rank (min, median, max...); Yd = 1 on ranks 0..k gives the
// complement D - Ds(k); Yd = 1 on rank r alone gives the gap between ranks.
//
// Timing: a window completed by the pixel entering at clock t leaves on
// out_valid at clock t + 1 + N_CH-1 + 1 = t + 11 (window register, nine
// sorting layers, output register), one result per clock.  cx/cy give the
// window centre of each result.  ys, yd and d_ref are control inputs,
// expected to stay fixed over a frame; they are read as the sorted vector
// reaches the switching nodes.  The comparator states of the sorter are not
// needed by this processor and are left unread.
module dmip3 #(
  parameter int unsigned W        = mip_pkg::PIX_W,
  parameter int unsigned IMG_W    = mip_pkg::IMG_W,
  parameter int unsigned IMG_H    = mip_pkg::IMG_H,
  parameter int unsigned WGT_W    = mip_pkg::WGT_W,
  parameter int unsigned WGT_FRAC = mip_pkg::WGT_FRAC,
  parameter int unsigned N        = mip_pkg::N_CH,
  parameter int unsigned ACC_W    = mip_pkg::acc_width(W + 1, WGT_W, N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // serial pixel input
  input  logic                     pix_valid,
  input  logic                     sof,
  input  logic [W-1:0]             pix,
  // control
  input  logic [W-1:0]             d_ref,     // upper reference level D
  input  logic signed [WGT_W-1:0]  ys [N],    // weights of the ranks
  input  logic signed [WGT_W-1:0]  yd [N],    // weights of the rank differences
  // results
  output logic                     out_valid,
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic [$clog2(IMG_H)-1:0] out_y,
  output logic                     out_eof,
  output logic [W-1:0]             ranks [N], // sorted window, aligned with outputs
  output logic signed [ACC_W-1:0]  f1_acc,    // rank output, exact
  output logic [W-1:0]             f1_pix,    // rank output, rounded and clamped
  output logic signed [ACC_W-1:0]  f2_acc,    // rank-difference output, exact
  output logic [W-1:0]             f2_pix
);
  localparam int unsigned XW    = $clog2(IMG_W);
  localparam int unsigned YW    = $clog2(IMG_H);
  localparam int unsigned DEPTH = N - 1;    // sorting layers
  localparam int unsigned TAG_W = XW + YW + 1;

  logic         win_valid, win_eof;
  logic [W-1:0] win [mip_pkg::WIN_N];
  logic [XW-1:0] win_x;
  logic [YW-1:0] win_y;

  window_buffer #(.W(W), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .pix_valid, .sof, .pix,
    .win_valid, .win, .cx(win_x), .cy(win_y), .eof(win_eof));

  // sorter input: nine window pixels plus the auxiliary channel at level 0
  logic [W-1:0] sort_in [N];
  always_comb begin
    for (int i = 0; i < N; i++) sort_in[i] = '0;
    for (int i = 0; i < mip_pkg::WIN_N; i++) sort_in[i] = win[i];
  end

  logic           srt_valid;
  logic [W-1:0]   ds [N];
  logic [N/2-1:0] swaps [DEPTH];

  wave_sorter #(.W(W), .N(N), .N_LAYERS(DEPTH)) u_sort (
    .clk, .rst_n, .in_valid(win_valid), .in_data(sort_in),
    .out_valid(srt_valid), .out_data(ds), .swaps);

  // window position travels beside the sorter
  logic [TAG_W-1:0] tag [DEPTH+1];
  assign tag[0] = {win_eof, win_y, win_x};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= DEPTH; i++) tag[i] <= '0;
    end else begin
      for (int i = 1; i <= DEPTH; i++) tag[i] <= tag[i-1];
    end
  end

  logic signed [W:0] dr  [N];
  logic signed [W:0] dsx [N];
  rank_diff #(.W(W), .N(N)) u_diff (.d_ref, .ds, .dr);
  always_comb for (int i = 0; i < N; i++) dsx[i] = $signed({1'b0, ds[i]});

  logic v1, v2;
  rank_weigher #(.IN_W(W + 1), .N(N), .WGT_W(WGT_W), .WGT_FRAC(WGT_FRAC),
                 .W_PIX(W), .ACC_W(ACC_W)) u_f1 (
    .clk, .rst_n, .in_valid(srt_valid), .x(dsx), .y(ys),
    .out_valid(v1), .acc(f1_acc), .pix(f1_pix));
  rank_weigher #(.IN_W(W + 1), .N(N), .WGT_W(WGT_W), .WGT_FRAC(WGT_FRAC),
                 .W_PIX(W), .ACC_W(ACC_W)) u_f2 (
    .clk, .rst_n, .in_valid(srt_valid), .x(dr), .y(yd),
    .out_valid(v2), .acc(f2_acc), .pix(f2_pix));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {out_eof, out_y, out_x} <= '0;
      for (int i = 0; i < N; i++) ranks[i] <= '0;
    end else begin
      {out_eof, out_y, out_x} <= srt_valid ? tag[DEPTH] : '0;
      ranks <= ds;
    end
  end
  assign out_valid = v1;

  // both switching nodes see the same sorted vector
  a_out_aligned: assert property (@(posedge clk) disable iff (!rst_n) v1 == v2);
endmodule
