// tb_cmp_swap: checks the max/min cell over random and corner operand pairs
// in both orders, including the comparator state and the no-swap-on-equal rule.
module tb_cmp_swap;
  logic [7:0] a, b, hi, lo;
  logic       desc, swapped;
  int checks = 0, failures = 0;

  cmp_swap #(.W(8)) dut (.a, .b, .descending(desc), .hi, .lo, .swapped);

  task automatic check(input logic [7:0] ta, tb_, input logic td);
    logic [7:0] emax, emin;
    a = ta; b = tb_; desc = td;
    #1;
    emax = (ta > tb_) ? ta : tb_;
    emin = (ta > tb_) ? tb_ : ta;
    checks++;
    if (td ? (hi !== emax || lo !== emin) : (hi !== emin || lo !== emax)) begin
      failures++;
      $display("FAIL a=%0d b=%0d desc=%0d hi=%0d lo=%0d", ta, tb_, td, hi, lo);
    end
    checks++;
    if (swapped !== (td ? (tb_ > ta) : (ta > tb_))) begin
      failures++;
      $display("FAIL swapped a=%0d b=%0d desc=%0d swapped=%0d", ta, tb_, td, swapped);
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
    check(0, 0, 1); check(255, 0, 1); check(0, 255, 1); check(7, 7, 0);
    check(128, 127, 0); check(127, 128, 0); check(255, 255, 1);
    for (int i = 0; i < 2000; i++) check(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
