// mip_top: the multifunctional image processor.
//
// Three processors stand side by side, each with its own ports:
//  * dmip3 - the pipelined digital image processor: serial pixel stream in,
//    3x3 window search, conveyor wave sorting node, two weighing-selection
//    outputs (weighted ranks and weighted rank differences), one result per
//    clock, 11 clocks of latency.
//  * mrp - the relational preprocessor with the iterative sorting node: ten
//    parallel signals, sorted in one sampling beat plus five iterations,
//    direct or inverse order, one-hot rank multiplexer.
//  * dmip1 - the parallel-input variant of the image processor: ten signals
//    per clock through the conveyor sorter, one rank out by a one-hot code,
//    10 clocks of latency.
// See the two modules for their timing.
module mip_top #(
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
  // image processor
  input  logic                     pix_valid,
  input  logic                     sof,
  input  logic [W-1:0]             pix,
  input  logic [W-1:0]             d_ref,
  input  logic signed [WGT_W-1:0]  ys [N],
  input  logic signed [WGT_W-1:0]  yd [N],
  output logic                     out_valid,
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic [$clog2(IMG_H)-1:0] out_y,
  output logic                     out_eof,
  output logic [W-1:0]             ranks [N],
  output logic signed [ACC_W-1:0]  f1_acc,
  output logic [W-1:0]             f1_pix,
  output logic signed [ACC_W-1:0]  f2_acc,
  output logic [W-1:0]             f2_pix,
  // iterative relational preprocessor
  input  logic                     mrp_start,
  input  logic                     mrp_descending,
  input  logic [W-1:0]             mrp_x [N],
  input  logic [N-1:0]             mrp_rank_sel,
  output logic                     mrp_busy,
  output logic                     mrp_done,
  output logic [W-1:0]             mrp_ranks [N],
  output logic [W-1:0]             mrp_out,
  // parallel-input processor
  input  logic                     par_valid,
  input  logic [W-1:0]             par_x [N],
  input  logic [N-1:0]             par_rank_sel,
  output logic                     par_out_valid,
  output logic [W-1:0]             par_out
);
  dmip3 #(.W(W), .IMG_W(IMG_W), .IMG_H(IMG_H), .WGT_W(WGT_W),
          .WGT_FRAC(WGT_FRAC), .N(N), .ACC_W(ACC_W)) u_dmip (
    .clk, .rst_n, .pix_valid, .sof, .pix, .d_ref, .ys, .yd,
    .out_valid, .out_x, .out_y, .out_eof, .ranks,
    .f1_acc, .f1_pix, .f2_acc, .f2_pix);

  mrp #(.W(W), .N(N)) u_mrp (
    .clk, .rst_n, .start(mrp_start), .descending(mrp_descending),
    .x_in(mrp_x), .rank_sel(mrp_rank_sel), .busy(mrp_busy), .done(mrp_done),
    .ranks(mrp_ranks), .out(mrp_out));

  dmip1 #(.W(W), .N(N)) u_par (
    .clk, .rst_n, .in_valid(par_valid), .x_in(par_x), .rank_sel(par_rank_sel),
    .out_valid(par_out_valid), .out(par_out));
endmodule
