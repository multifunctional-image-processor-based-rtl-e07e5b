// tb_mip_top: end-to-end test of the whole processor at its default size
// (64x64 image, ten sorting channels).  The image processor takes several
// frames, each with its own control vectors; the iterative preprocessor sorts
// windows of the same frames at the same time.  Every image result is checked
// against the reference model, every preprocessor rank against a reference
// sort.  Each mechanism of the design is counted and must occur: pixel-stream
// stalls, border positions without a result, a frame restarted by sof in the
// middle of another, single-rank selection, complement via rank differences,
// fractional and negative weights, clamping at both ends of the pixel range,
// direct and inverse iterative sorting, and rank selection on the
// parallel-input processor, which is fed one random vector per clock.
module tb_mip_top;
  import mip_ref_pkg::*;
  localparam int IW = 64, IH = 64, ACC_W = 21;
  logic clk = 0, rst_n = 0, pix_valid = 0, sof = 0;
  logic [7:0] pix, d_ref;
  logic signed [7:0] ys [N], yd [N];
  logic out_valid, out_eof;
  logic [5:0] out_x, out_y;
  logic [7:0] ranks [N], f1_pix, f2_pix;
  logic signed [ACC_W-1:0] f1_acc, f2_acc;
  logic mrp_start = 0, mrp_descending = 1, mrp_busy, mrp_done;
  logic [7:0] mrp_x [N], mrp_ranks [N], mrp_out;
  logic [N-1:0] mrp_rank_sel = '0;
  logic par_valid = 0, par_out_valid;
  logic [7:0] par_x [N], par_out;
  logic [N-1:0] par_rank_sel = 1;
  int par_exp [2048], par_sent [2048];
  int par_wr = 0, par_rd = 0, n_par = 0;
  int checks = 0, failures = 0;
  int img [];
  int entry [IW * IH];
  int cycle = 0, nres = 0;
  int ys_i [N], yd_i [N];
  // mechanism counters
  int n_stall = 0, n_border = 0, n_restart = 0, n_select = 0, n_compl = 0;
  int n_frac = 0, n_neg = 0, n_clamp_hi = 0, n_clamp_lo = 0, n_direct = 0, n_inverse = 0;
  bit frame_select, frame_compl, frame_frac, frame_neg;

  mip_top dut (
    .clk, .rst_n, .pix_valid, .sof, .pix, .d_ref, .ys, .yd,
    .out_valid, .out_x, .out_y, .out_eof, .ranks, .f1_acc, .f1_pix, .f2_acc, .f2_pix,
    .mrp_start, .mrp_descending, .mrp_x, .mrp_rank_sel, .mrp_busy, .mrp_done,
    .mrp_ranks, .mrp_out,
    .par_valid, .par_x, .par_rank_sel, .par_out_valid, .par_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      ref_t e;
      int pos;
      e = model(img, IW, int'(out_x), int'(out_y), int'(d_ref), ys_i, yd_i);
      pos = (int'(out_y) + 1) * IW + int'(out_x) + 1;
      nres++;
      checks++;
      if (cycle - entry[pos] != 11) begin
        failures++;
        $display("FAIL latency %0d", cycle - entry[pos]);
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
      if ((e.f1 + 2) >>> 2 > 255 || (e.f2 + 2) >>> 2 > 255) n_clamp_hi++;
      if ((e.f1 + 2) >>> 2 < 0 || (e.f2 + 2) >>> 2 < 0) n_clamp_lo++;
      if (frame_select) n_select++;
      if (frame_compl)  n_compl++;
      if (frame_frac)   n_frac++;
      if (frame_neg)    n_neg++;
    end
  end

  // the parallel-input processor: bursts of random vectors, one rank code per burst
  always @(posedge clk) begin
    if (rst_n && par_out_valid) begin
      checks++;
      n_par++;
      if (par_out !== 8'(par_exp[par_rd % 2048]) || cycle - par_sent[par_rd % 2048] != N) begin
        failures++;
        $display("FAIL parallel #%0d out=%0d want %0d", par_rd, par_out, par_exp[par_rd % 2048]);
      end
      par_rd <= par_rd + 1;
    end
  end

  initial begin
    int v [N];
    for (int i = 0; i < N; i++) par_x[i] = '0;
    @(posedge rst_n);
    for (int b = 0; b < 40; b++) begin
      par_rank_sel = N'(1) << (b % N);
      for (int k = 0; k < 50; k++) begin
        for (int i = 0; i < N - 1; i++) v[i] = $urandom_range(0, 255);
        v[N-1] = 0;
        for (int i = 0; i < N; i++) par_x[i] = 8'(v[i]);
        v.rsort();
        par_exp[par_wr % 2048] = v[b % N];
        par_sent[par_wr % 2048] = cycle;
        par_wr++;
        par_valid = 1;
        @(posedge clk);
        #1;
      end
      par_valid = 0;
      repeat (N + 2) @(posedge clk);
      #1;
    end
  end

  // the iterative preprocessor sorts random windows alongside, one after another
  initial begin
    int t = 0, cyc;
    int s [N];
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      #2;
      for (int i = 0; i < N - 1; i++) mrp_x[i] = 8'($urandom);
      mrp_x[N-1] = 0;
      mrp_descending = (t % 3 != 1);
      mrp_rank_sel = N'(1) << (t % N);
      mrp_start = 1;
      @(posedge clk);
      #2 mrp_start = 0;
      cyc = 1;
      while (!mrp_done && cyc < 20) begin @(posedge clk); #2 cyc++; end
      checks++;
      if (cyc != 6) begin failures++; $display("FAIL mrp sort took %0d clocks", cyc); end
      for (int i = 0; i < N; i++) s[i] = int'(mrp_x[i]);
      if (mrp_descending) begin s.rsort(); n_direct++; end
      else begin s.sort(); n_inverse++; end
      for (int r = 0; r < N; r++) begin
        checks++;
        if (mrp_ranks[r] !== 8'(s[r])) begin
          failures++; $display("FAIL mrp rank %0d=%0d want %0d", r, mrp_ranks[r], s[r]);
        end
      end
      checks++;
      if (mrp_out !== 8'(s[t % N])) begin
        failures++; $display("FAIL mrp out %0d want %0d", mrp_out, s[t % N]);
      end
      t++;
    end
  end

  task automatic frame(input int sv [N], input int dv [N], input int d, input int npix);
    int col, row;
    ys_i = sv; yd_i = dv;
    for (int i = 0; i < N; i++) begin ys[i] = 8'(sv[i]); yd[i] = 8'(dv[i]); end
    d_ref = 8'(d);
    img = new[IW * IH];
    for (int i = 0; i < IW * IH; i++) img[i] = $urandom_range(0, 255);
    nres = 0;
    for (int i = 0; i < npix; i++) begin
      while ($urandom_range(0, 15) == 0) begin
        pix_valid = 0; sof = 0; n_stall++;
        @(posedge clk);
        #1;
      end
      col = i % IW; row = i / IW;
      if (col < 2 || row < 2) n_border++;
      pix_valid = 1; sof = (i == 0); pix = 8'(img[i]);
      entry[i] = cycle;
      @(posedge clk);
      #1;
    end
    pix_valid = 0; sof = 0;
    repeat (14) @(posedge clk);
    #1;
    if (npix == IW * IH) begin
      checks++;
      if (nres != (IW - 2) * (IH - 2)) begin
        failures++; $display("FAIL %0d results in frame", nres);
      end
    end
  endtask

  task automatic set_kind(input bit s, c, f, n);
    frame_select = s; frame_compl = c; frame_frac = f; frame_neg = n;
  endtask

  // weights in quarters
  int v_med  [N] = '{0, 0, 0, 0, 4, 0, 0, 0, 0, 0};
  int v_y4   [N] = '{4, 4, 4, 4, 4, 0, 0, 0, 0, 0};
  int v_y3   [N] = '{0, 4, 8, 12, 16, 20, 20, 20, 20, 20};
  int v_y9   [N] = '{0, 4, 4, 4, 4, -4, -4, -4, -4, 0};
  int v_s3456[N] = '{0, 0, 0, 1, 1, 1, 1, 0, 0, 0};
  int v_d2s7 [N] = '{0, 0, 4, 4, 4, 4, 4, 0, 0, 0};

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix = 0; d_ref = 255;
    for (int i = 0; i < N; i++) begin ys[i] = '0; yd[i] = '0; mrp_x[i] = '0; end
    set_kind(0, 0, 0, 0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // median filter and complement of the median
    set_kind(1, 1, 0, 0);
    frame(v_med, v_y4, 255, IW * IH);
    // a frame cut short and restarted by sof
    frame(v_med, v_y4, 255, IW * 5 + 17);
    n_restart++;
    // weighted ranks (clamps high) and signed rank-difference weights (clamps low)
    set_kind(0, 0, 0, 1);
    frame(v_y3, v_y9, 255, IW * IH);
    // mean of the four middle ranks and the spread of ranks 1..6
    set_kind(0, 0, 1, 0);
    frame(v_s3456, v_d2s7, 255, IW * IH);
    $display("stalls=%0d border=%0d restart=%0d select=%0d complement=%0d frac=%0d neg=%0d clamp_hi=%0d clamp_lo=%0d direct=%0d inverse=%0d parallel=%0d",
             n_stall, n_border, n_restart, n_select, n_compl, n_frac, n_neg,
             n_clamp_hi, n_clamp_lo, n_direct, n_inverse, n_par);
    checks++;
    if (n_stall == 0 || n_border == 0 || n_restart == 0 || n_select == 0 || n_compl == 0 ||
        n_frac == 0 || n_neg == 0 || n_clamp_hi == 0 || n_clamp_lo == 0 ||
        n_direct == 0 || n_inverse == 0 || n_par != par_wr || n_par == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
