// window_buffer: register memory for serial image input and automatic
// sequential search of 3x3 windows.
//
// Pixels arrive in raster order, one per clock with `pix_valid`; `sof` marks
// the first pixel of a frame and restarts the row/column count.  Two shift
// registers of IMG_W pixels each hold the two previous image rows; three
// column registers per row hold the current window.  When the pixel at
// (row, col) arrives with row >= 2 and col >= 2, the full window centred on
// (row-1, col-1) is presented one clock later with `win_valid`, its centre
// on cx/cy.  Border pixels, whose window would leave the image, get no
// output: a frame of IMG_W x IMG_H pixels yields (IMG_W-2) x (IMG_H-2)
// windows.  Holding pix_valid low stalls everything.
//
// Window order: win[3*r + c], r = 0 top row (oldest), c = 0 left column.
module window_buffer #(
  parameter int unsigned W     = mip_pkg::PIX_W,
  parameter int unsigned IMG_W = mip_pkg::IMG_W,
  parameter int unsigned IMG_H = mip_pkg::IMG_H
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pix_valid,
  input  logic                     sof,
  input  logic [W-1:0]             pix,
  output logic                     win_valid,
  output logic [W-1:0]             win [mip_pkg::WIN_N],
  output logic [$clog2(IMG_W)-1:0] cx,
  output logic [$clog2(IMG_H)-1:0] cy,
  output logic                     eof      // last window of the frame
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  logic [W-1:0]  line0 [IMG_W];   // previous row
  logic [W-1:0]  line1 [IMG_W];   // row before that
  logic [W-1:0]  wreg  [3][3];    // [row][col]
  logic [XW-1:0] col_q, col;
  logic [YW-1:0] row_q, row;

  // position of the incoming pixel
  always_comb begin
    col = sof ? '0 : col_q;
    row = sof ? '0 : row_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q     <= '0;
      row_q     <= '0;
      win_valid <= 1'b0;
      eof       <= 1'b0;
      cx        <= '0;
      cy        <= '0;
      for (int i = 0; i < IMG_W; i++) begin
        line0[i] <= '0;
        line1[i] <= '0;
      end
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) wreg[r][c] <= '0;
    end else begin
      win_valid <= 1'b0;
      eof       <= 1'b0;
      if (pix_valid) begin
        // row buffers
        line0[0] <= pix;
        line1[0] <= line0[IMG_W-1];
        for (int i = 1; i < IMG_W; i++) begin
          line0[i] <= line0[i-1];
          line1[i] <= line1[i-1];
        end
        // window columns shift left, new column enters on the right
        for (int r = 0; r < 3; r++) begin
          wreg[r][0] <= wreg[r][1];
          wreg[r][1] <= wreg[r][2];
        end
        wreg[0][2] <= line1[IMG_W-1];
        wreg[1][2] <= line0[IMG_W-1];
        wreg[2][2] <= pix;
        // position count
        if (col == XW'(IMG_W - 1)) begin
          col_q <= '0;
          row_q <= (row == YW'(IMG_H - 1)) ? '0 : row + 1'b1;
        end else begin
          col_q <= col + 1'b1;
          row_q <= row;
        end
        win_valid <= (col >= XW'(2)) && (row >= YW'(2));
        eof       <= (col == XW'(IMG_W - 1)) && (row == YW'(IMG_H - 1));
        cx        <= col - 1'b1;
        cy        <= row - 1'b1;
      end
    end
  end

  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[3*r + c] = wreg[r][c];
endmodule
