// tb_mrp: the relational preprocessor: sorts random windows (nine pixels plus
// an auxiliary channel), then reads every rank through the one-hot rank
// multiplexer: max, median and min are among them.  Checks the six-clock
// sorting time and inverse order.
module tb_mrp;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, start = 0, descending = 1, busy, done;
  logic [7:0] x_in [N], ranks [N], out;
  logic [N-1:0] rank_sel = '0;
  int checks = 0, failures = 0;

  mrp #(.W(8), .N(N)) dut (.clk, .rst_n, .start, .descending, .x_in, .rank_sel,
                           .busy, .done, .ranks, .out);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [N], s [N], cyc;
    for (int i = 0; i < N; i++) x_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N - 1; i++) v[i] = $urandom_range(0, 255);
      v[N-1] = 0;
      for (int i = 0; i < N; i++) x_in[i] = 8'(v[i]);
      descending = (t % 3 != 2);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      cyc = 1;
      while (!done && cyc < 20) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (cyc != 6) begin failures++; $display("FAIL sort took %0d clocks", cyc); end
      s = v;
      if (descending) s.rsort(); else s.sort();
      for (int r = 0; r < N; r++) begin
        rank_sel = N'(1) << r;
        #1;
        checks++;
        if (out !== 8'(s[r]) || ranks[r] !== 8'(s[r])) begin
          failures++;
          $display("FAIL t=%0d rank %0d out=%0d want %0d", t, r, out, s[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
