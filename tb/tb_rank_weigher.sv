// tb_rank_weigher: weighted sums with the example control vectors (integer,
// fractional and negative weights) and random ones, one-clock latency,
// rounding and clamping of the pixel output.
module tb_rank_weigher;
  localparam int N = 10, IN_W = 9, WGT_W = 8, FRAC = 2;
  localparam int ACC_W = IN_W + WGT_W + 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IN_W-1:0]  x [N];
  logic signed [WGT_W-1:0] y [N];
  logic signed [ACC_W-1:0] acc;
  logic [7:0] pix;
  int checks = 0, failures = 0;
  int n_clamp_hi = 0, n_clamp_lo = 0;

  rank_weigher #(.IN_W(IN_W), .N(N), .WGT_W(WGT_W), .WGT_FRAC(FRAC), .W_PIX(8),
                 .ACC_W(ACC_W)) dut (.clk, .rst_n, .in_valid, .x, .y, .out_valid, .acc, .pix);

  always #5 clk = ~clk;

  // weights in quarters, as in the examples: Y2, Y3, Y4, Y7, Y9, Ys45, Ys3456
  int vec [7][N] = '{
    '{0, 4, 8, 12, 16, 20, 24, 28, 32, 36},
    '{0, 4, 8, 12, 16, 20, 20, 20, 20, 20},
    '{4, 4, 4, 4, 4, 0, 0, 0, 0, 0},
    '{36, 32, 28, 24, 20, 16, 12, 8, 4, 0},
    '{0, 4, 4, 4, 4, -4, -4, -4, -4, 0},
    '{0, 0, 0, 0, 2, 2, 0, 0, 0, 0},
    '{0, 0, 0, 1, 1, 1, 1, 0, 0, 0}};

  task automatic apply(input int xv [N], input int yv [N]);
    int s, r, e;
    for (int i = 0; i < N; i++) begin
      x[i] = IN_W'(xv[i]);
      y[i] = WGT_W'(yv[i]);
    end
    in_valid = 1;
    @(posedge clk);
    #1 in_valid = 0;
    s = 0;
    for (int i = 0; i < N; i++) s += xv[i] * yv[i];
    r = (s + 2) >>> 2;
    e = (r < 0) ? 0 : (r > 255) ? 255 : r;
    if (r < 0) n_clamp_lo++;
    if (r > 255) n_clamp_hi++;
    checks++;
    if (!out_valid || acc !== ACC_W'(s) || pix !== 8'(e)) begin
      failures++;
      $display("FAIL valid=%0d acc=%0d want %0d pix=%0d want %0d", out_valid, acc, s, pix, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv [N], yv [N];
    for (int i = 0; i < N; i++) begin x[i] = '0; y[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid without input"); end
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < N; i++) xv[i] = $urandom_range(0, 510) - 255;
      if (t < 7 * 4) yv = vec[t % 7];
      else for (int i = 0; i < N; i++) yv[i] = $urandom_range(0, 255) - 128;
      apply(xv, yv);
    end
    // half-way rounding: 1.5 rounds to 2, 2.25 to 2
    for (int i = 0; i < N; i++) begin xv[i] = 0; yv[i] = 0; end
    xv[0] = 3; yv[0] = 2;  apply(xv, yv);
    xv[0] = 9; yv[0] = 1;  apply(xv, yv);
    checks++;
    if (n_clamp_hi == 0 || n_clamp_lo == 0) begin
      failures++;
      $display("FAIL clamping not exercised: hi=%0d lo=%0d", n_clamp_hi, n_clamp_lo);
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
