// tb_window_buffer: streams three small frames with random gaps in pix_valid
// and checks every window against the image, its centre coordinates, that
// border positions produce no window, the window count per frame and the
// end-of-frame flag.  The third frame starts in the middle of the second
// (sof restarts the count).
module tb_window_buffer;
  localparam int IW = 8, IH = 6;
  logic clk = 0, rst_n = 0, pix_valid = 0, sof = 0;
  logic [7:0] pix;
  logic win_valid, eof;
  logic [7:0] win [9];
  logic [2:0] cx, cy;
  int checks = 0, failures = 0;
  int img [];
  int nwin = 0, neof = 0, stalls = 0;

  window_buffer #(.W(8), .IMG_W(IW), .IMG_H(IH)) dut (
    .clk, .rst_n, .pix_valid, .sof, .pix, .win_valid, .win, .cx, .cy, .eof);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && win_valid) begin
      nwin++;
      checks++;
      if (cx < 1 || cx > IW - 2 || cy < 1 || cy > IH - 2) begin
        failures++;
        $display("FAIL window at border (%0d,%0d)", cx, cy);
      end else begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (win[3*r + c] !== 8'(img[(cy - 1 + r) * IW + cx - 1 + c])) begin
              failures++;
              $display("FAIL (%0d,%0d) win[%0d]=%0d want %0d", cx, cy, 3*r + c,
                       win[3*r + c], img[(cy - 1 + r) * IW + cx - 1 + c]);
            end
          end
      end
      checks++;
      if (eof !== (cx == IW - 2 && cy == IH - 2)) begin failures++; $display("FAIL eof"); end
    end
    if (rst_n && eof) neof++;
  end

  task automatic frame(input int npix);
    img = new[IW * IH];
    for (int i = 0; i < IW * IH; i++) img[i] = $urandom_range(0, 255);
    for (int i = 0; i < npix; i++) begin
      while ($urandom_range(0, 3) == 0) begin
        pix_valid = 0; sof = 0; stalls++;
        @(posedge clk);
        #1;
      end
      pix_valid = 1; sof = (i == 0); pix = 8'(img[i]);
      @(posedge clk);
      #1;
    end
    pix_valid = 0; sof = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    frame(IW * IH);
    checks++;
    if (nwin != (IW - 2) * (IH - 2) || neof != 1) begin
      failures++; $display("FAIL frame 1: %0d windows, %0d eof", nwin, neof);
    end
    nwin = 0;
    frame(IW * 3 + 2);     // aborted frame
    nwin = 0;
    frame(IW * IH);
    checks++;
    if (nwin != (IW - 2) * (IH - 2) || neof != 2) begin
      failures++; $display("FAIL frame 3: %0d windows, %0d eof", nwin, neof);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stalls"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
