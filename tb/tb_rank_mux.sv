// tb_rank_mux: one-hot rank selection over random rank vectors, every rank,
// plus the empty code.
module tb_rank_mux;
  localparam int N = 10;
  logic [7:0] ranks [N];
  logic [N-1:0] y;
  logic [7:0] out;
  int checks = 0, failures = 0;

  rank_mux #(.W(8), .N(N)) dut (.ranks, .y, .out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) ranks[i] = 8'($urandom);
      for (int r = 0; r < N; r++) begin
        y = N'(1) << r;
        #1;
        checks++;
        if (out !== ranks[r]) begin
          failures++;
          $display("FAIL rank %0d: got %0d want %0d", r, out, ranks[r]);
        end
      end
      y = '0;
      #1;
      checks++;
      if (out !== 8'd0) begin failures++; $display("FAIL empty code gives %0d", out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
