// tb_rank_diff: rank differences of random descending vectors (aux rank 0),
// the telescoping sum to D, and a negative difference when D is below the max.
module tb_rank_diff;
  localparam int N = 10;
  logic [7:0] d_ref;
  logic [7:0] ds [N];
  logic signed [8:0] dr [N];
  int checks = 0, failures = 0;

  rank_diff #(.W(8), .N(N)) dut (.d_ref, .ds, .dr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int v [N];
      int sum, prev;
      // random descending ranks, last (auxiliary) rank 0
      for (int i = 0; i < N - 1; i++) v[i] = $urandom_range(0, 255);
      v.rsort();
      v[N-1] = 0;
      for (int i = 0; i < N; i++) ds[i] = 8'(v[i]);
      d_ref = (t % 4 == 0) ? 8'(v[0]) : 8'd255;
      if (t == 7) d_ref = 8'(v[0] / 2);   // D below the maximum
      #1;
      sum = 0; prev = d_ref;
      for (int r = 0; r < N; r++) begin
        checks++;
        if (dr[r] !== 9'(prev - v[r])) begin
          failures++;
          $display("FAIL t=%0d Dr(%0d)=%0d want %0d", t, r, dr[r], prev - v[r]);
        end
        sum += int'(dr[r]);
        prev = v[r];
      end
      checks++;
      if (sum != int'(d_ref)) begin
        failures++;
        $display("FAIL t=%0d differences add to %0d, D=%0d", t, sum, d_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
