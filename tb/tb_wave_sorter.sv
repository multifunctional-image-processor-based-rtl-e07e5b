// tb_wave_sorter: the ten-channel conveyor sorter (nine data channels plus the
// auxiliary channel at 0).  Feeds one vector per clock, so the pipeline is
// full, and checks every output against a reference sort, the latency of nine
// clocks, and all 512 zero-one inputs (which by the zero-one principle cover
// every input).  A second instance with N layers sorts arbitrary vectors.
module tb_wave_sorter;
  localparam int N = 10, L = N - 1;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid, in_valid2 = 0, out_valid2;
  logic [7:0] in_data [N], out_data [N], in_data2 [N], out_data2 [N];
  logic [N/2-1:0] swaps [L];
  logic [N/2-1:0] swaps2 [N];
  int checks = 0, failures = 0;
  int exp_a  [2048][N];
  int exp_a2 [2048][N];
  int sent_cycle [2048];
  int wr = 0, rd = 0, rd2 = 0;
  int cycle = 0;

  wave_sorter #(.W(8), .N(N), .N_LAYERS(L)) dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .swaps);
  wave_sorter #(.W(8), .N(N), .N_LAYERS(N)) dut_full (
    .clk, .rst_n, .in_valid(in_valid2), .in_data(in_data2),
    .out_valid(out_valid2), .out_data(out_data2), .swaps(swaps2));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e [N];
      e = exp_a[rd];
      checks++;
      if (cycle - sent_cycle[rd] != L) begin
        failures++;
        $display("FAIL latency");
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (out_data[i] !== 8'(e[i])) begin
          failures++;
          $display("FAIL ch%0d got %0d want %0d", i, out_data[i], e[i]);
        end
      end
      rd <= rd + 1;
    end
    if (rst_n && out_valid2) begin
      int e [N];
      e = exp_a2[rd2];
      for (int i = 0; i < N; i++) begin
        checks++;
        if (out_data2[i] !== 8'(e[i])) begin
          failures++;
          $display("FAIL full ch%0d got %0d want %0d", i, out_data2[i], e[i]);
        end
      end
      rd2 <= rd2 + 1;
    end
  end

  task automatic push(input int v [N], input int v2 [N]);
    int s [N], s2 [N];
    for (int i = 0; i < N; i++) begin
      in_data[i] = 8'(v[i]); in_data2[i] = 8'(v2[i]);
    end
    s = v; s.rsort(); s2 = v2; s2.rsort();
    exp_a[wr] = s;
    exp_a2[wr] = s2;
    sent_cycle[wr] = cycle;
    wr++;
    in_valid = 1; in_valid2 = 1;
    @(posedge clk);
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [N], v2 [N];
    for (int i = 0; i < N; i++) begin in_data[i] = '0; in_data2[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // zero-one inputs
    for (int m = 0; m < 512; m++) begin
      for (int i = 0; i < N - 1; i++) v[i] = m[i] ? 255 : 0;
      v[N-1] = 0;
      for (int i = 0; i < N; i++) v2[i] = (m + 7 * i) % 3 == 0 ? 200 : 3;
      push(v, v2);
    end
    // reverse order, as in the iterative-node demonstration, and random
    for (int t = 0; t < 600; t++) begin
      for (int i = 0; i < N - 1; i++) v[i] = (t == 0) ? i * 20 : $urandom_range(0, 255);
      v[N-1] = 0;
      for (int i = 0; i < N; i++) v2[i] = (t == 0) ? i * 20 : $urandom_range(0, 255);
      push(v, v2);
    end
    in_valid = 0; in_valid2 = 0;
    repeat (N + 3) @(posedge clk);
    checks++;
    if (rd != wr || rd2 != wr) begin
      failures++;
      $display("FAIL results missing: sent %0d got %0d and %0d", wr, rd, rd2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
