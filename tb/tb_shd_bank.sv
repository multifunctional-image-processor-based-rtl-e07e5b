// tb_shd_bank: sampling, rewriting, hold and the priority of sampling.
module tb_shd_bank;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, sample = 0, rewrite = 0;
  logic [7:0] x_in [N], fb_in [N], q [N], exp_q [N];
  int checks = 0, failures = 0;

  shd_bank #(.W(8), .N(N)) dut (.clk, .rst_n, .sample, .rewrite, .x_in, .fb_in, .q);

  always #5 clk = ~clk;

  task automatic step(input logic s, input logic r);
    for (int i = 0; i < N; i++) begin x_in[i] = 8'($urandom); fb_in[i] = 8'($urandom); end
    sample = s; rewrite = r;
    if (s) exp_q = x_in; else if (r) exp_q = fb_in;
    @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] !== exp_q[i]) begin
        failures++;
        $display("FAIL s=%0d r=%0d ch%0d q=%0d want %0d", s, r, i, q[i], exp_q[i]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin x_in[i] = '1; fb_in[i] = '1; exp_q[i] = '0; end
    #12;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] !== 8'd0) begin failures++; $display("FAIL reset ch%0d", i); end
    end
    rst_n = 1;
    for (int t = 0; t < 300; t++) step(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
