// tb_dmip1: parallel-input processor; a stream of random windows (with gaps)
// and a rank code that steps through all ranks; every output is compared with
// the rank of a reference sort, and the latency must be ten clocks.
module tb_dmip1;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] x_in [N], out;
  logic [N-1:0] rank_sel;
  int checks = 0, failures = 0;
  int exp_v [4096], sent [4096];
  int wr = 0, rd = 0, cycle = 0, r_cur = 0;

  dmip1 #(.W(8), .N(N)) dut (.clk, .rst_n, .in_valid, .x_in, .rank_sel, .out_valid, .out);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out !== 8'(exp_v[rd]) || cycle - sent[rd] != N) begin
        failures++;
        $display("FAIL #%0d out=%0d want %0d latency %0d", rd, out, exp_v[rd], cycle - sent[rd]);
      end
      rd <= rd + 1;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [N];
    for (int i = 0; i < N; i++) x_in[i] = '0;
    rank_sel = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < N; r++) begin
      rank_sel = N'(1) << r;
      for (int t = 0; t < 100; t++) begin
        if ($urandom_range(0, 5) == 0) begin
          in_valid = 0;
          @(posedge clk);
          #1;
        end
        for (int i = 0; i < N - 1; i++) v[i] = $urandom_range(0, 255);
        v[N-1] = 0;
        for (int i = 0; i < N; i++) x_in[i] = 8'(v[i]);
        v.rsort();
        exp_v[wr] = v[r];
        sent[wr] = cycle;
        wr++;
        in_valid = 1;
        @(posedge clk);
        #1;
      end
      // let the pipeline drain before the code changes
      in_valid = 0;
      repeat (N + 2) @(posedge clk);
      #1;
    end
    checks++;
    if (rd != wr) begin failures++; $display("FAIL %0d of %0d results", rd, wr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
