// tb_dmip3: the pipelined image processor on small random frames, one set of
// control vectors per frame (the example vectors of the design plus random
// ones).  Every result is compared with the reference model: all ten ranks,
// both exact sums and both output pixels; the latency from the pixel that
// completes a window to its result must be 11 clocks; each frame must give
// (W-2)*(H-2) results.  Random gaps in the pixel stream are inserted.
module tb_dmip3;
  import mip_ref_pkg::*;
  localparam int IW = 10, IH = 8, ACC_W = 21;
  logic clk = 0, rst_n = 0, pix_valid = 0, sof = 0;
  logic [7:0] pix, d_ref;
  logic signed [7:0] ys [N], yd [N];
  logic out_valid, out_eof;
  logic [3:0] out_x;
  logic [2:0] out_y;
  logic [7:0] ranks [N], f1_pix, f2_pix;
  logic signed [ACC_W-1:0] f1_acc, f2_acc;
  int checks = 0, failures = 0;
  int img [];
  int entry [IW * IH];
  int cycle = 0, nres = 0;
  int ys_i [N], yd_i [N];

  dmip3 #(.W(8), .IMG_W(IW), .IMG_H(IH)) dut (
    .clk, .rst_n, .pix_valid, .sof, .pix, .d_ref, .ys, .yd,
    .out_valid, .out_x, .out_y, .out_eof, .ranks, .f1_acc, .f1_pix, .f2_acc, .f2_pix);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      ref_t e;
      e = model(img, IW, int'(out_x), int'(out_y), int'(d_ref), ys_i, yd_i);
      nres++;
      checks++;
      if (cycle - entry[(out_y + 1) * IW + out_x + 1] != 11) begin
        failures++;
        $display("FAIL latency %0d", cycle - entry[(out_y + 1) * IW + out_x + 1]);
      end
      for (int r = 0; r < N; r++) begin
        checks++;
        if (ranks[r] !== 8'(e.ds[r])) begin
          failures++; $display("FAIL (%0d,%0d) rank %0d=%0d want %0d", out_x, out_y, r, ranks[r], e.ds[r]);
        end
      end
      checks++;
      if (f1_acc !== ACC_W'(e.f1) || f1_pix !== 8'(e.p1) ||
          f2_acc !== ACC_W'(e.f2) || f2_pix !== 8'(e.p2)) begin
        failures++;
        $display("FAIL (%0d,%0d) f1=%0d/%0d want %0d/%0d f2=%0d/%0d want %0d/%0d", out_x, out_y,
                 f1_acc, f1_pix, e.f1, e.p1, f2_acc, f2_pix, e.f2, e.p2);
      end
    end
  end

  task automatic frame(input int sv [N], input int dv [N], input int d);
    ys_i = sv; yd_i = dv;
    for (int i = 0; i < N; i++) begin ys[i] = 8'(sv[i]); yd[i] = 8'(dv[i]); end
    d_ref = 8'(d);
    img = new[IW * IH];
    for (int i = 0; i < IW * IH; i++) img[i] = $urandom_range(0, 255);
    nres = 0;
    for (int i = 0; i < IW * IH; i++) begin
      while ($urandom_range(0, 4) == 0) begin
        pix_valid = 0; sof = 0;
        @(posedge clk);
        #1;
      end
      pix_valid = 1; sof = (i == 0); pix = 8'(img[i]);
      entry[i] = cycle;
      @(posedge clk);
      #1;
    end
    pix_valid = 0; sof = 0;
    repeat (14) @(posedge clk);
    #1;
    checks++;
    if (nres != (IW - 2) * (IH - 2)) begin
      failures++; $display("FAIL %0d results in frame", nres);
    end
  endtask

  // weights in quarters
  int v_med  [N] = '{0, 0, 0, 0, 4, 0, 0, 0, 0, 0};
  int v_y4   [N] = '{4, 4, 4, 4, 4, 0, 0, 0, 0, 0};
  int v_y3   [N] = '{0, 4, 8, 12, 16, 20, 20, 20, 20, 20};
  int v_y9   [N] = '{0, 4, 4, 4, 4, -4, -4, -4, -4, 0};
  int v_s45  [N] = '{0, 0, 0, 0, 2, 2, 0, 0, 0, 0};
  int v_d2s7 [N] = '{0, 0, 4, 4, 4, 4, 4, 0, 0, 0};
  int v_s3456[N] = '{0, 0, 0, 1, 1, 1, 1, 0, 0, 0};
  int v_yk   [N] = '{0, 0, 0, 0, 0, 0, 4, 0, 0, 0};
  int v_y7   [N] = '{36, 32, 28, 24, 20, 16, 12, 8, 4, 0};
  int v_y8   [N] = '{0, 4, 4, 4, 4, 0, 4, 4, 4, 4};
  int v_y5   [N] = '{4, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  int v_y6   [N] = '{4, 4, 4, 4, 4, 4, 4, 4, 4, 0};

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rs [N], rd [N];
    pix = 0; d_ref = 255;
    for (int i = 0; i < N; i++) begin ys[i] = '0; yd[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    frame(v_med, v_y4, 255);
    frame(v_y3, v_y9, 255);
    frame(v_s45, v_d2s7, 255);
    frame(v_s3456, v_yk, 200);
    frame(v_y7, v_y8, 255);
    frame(v_y5, v_y6, 255);
    frame(v_y6, v_y5, 255);     // complement of the largest on output 2
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < N; i++) begin
        rs[i] = $urandom_range(0, 255) - 128;
        rd[i] = $urandom_range(0, 255) - 128;
      end
      frame(rs, rd, $urandom_range(0, 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
