// tb_iter_sorter: the iterative sorting node on all 1024 zero-one vectors and
// random vectors, in direct and inverse order; checks that done rises exactly
// six clocks after start (one sampling beat, five iterations), that busy
// covers the iterations and that start while busy is ignored.
module tb_iter_sorter;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, start = 0, descending = 1, busy, done;
  logic [7:0] x_in [N], sorted [N];
  int checks = 0, failures = 0;

  iter_sorter #(.W(8), .N(N)) dut (.clk, .rst_n, .start, .descending, .x_in, .busy, .done, .sorted);

  always #5 clk = ~clk;

  task automatic run(input int v [N], input logic desc, input bit poke);
    int s [N], cyc;
    for (int i = 0; i < N; i++) x_in[i] = 8'(v[i]);
    descending = desc;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    cyc = 1;
    while (!done && cyc < 20) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during sort"); end
      if (poke && cyc == 2) begin
        // a start while busy must not resample
        for (int i = 0; i < N; i++) x_in[i] = 8'($urandom);
        start = 1;
      end
      @(posedge clk);
      #1 start = 0;
      cyc++;
    end
    checks++;
    if (cyc != 6) begin failures++; $display("FAIL done after %0d clocks, want 6", cyc); end
    s = v;
    if (desc) s.rsort(); else s.sort();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sorted[i] !== 8'(s[i])) begin
        failures++;
        $display("FAIL desc=%0d ch%0d got %0d want %0d", desc, i, sorted[i], s[i]);
      end
    end
    // result holds
    @(posedge clk);
    #1;
    checks++;
    if (!done || sorted[0] !== 8'(s[0])) begin failures++; $display("FAIL result not held"); end
  endtask

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
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 1024; m++) begin
      for (int i = 0; i < N; i++) v[i] = m[i] ? 9 : 1;
      run(v, 1'b1, 1'b0);
      run(v, 1'b0, 1'b0);
    end
    for (int i = 0; i < N; i++) v[i] = i * 25;      // reverse-ordered input
    run(v, 1'b1, 1'b0);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) v[i] = $urandom_range(0, 255);
      run(v, 1'($urandom), t % 10 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
