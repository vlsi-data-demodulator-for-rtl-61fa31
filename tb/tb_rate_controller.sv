// Testbench for rate_controller: starts at P = 887, follows random carry and
// borrow pulses with a saturating reference counter, and is driven into both
// limits (790 and 983) by long runs of one kind of pulse.
module tb_rate_controller;
  logic clk = 1'b0, rst_n = 1'b0, carry = 1'b0, borrow = 1'b0;
  logic [10:0] p;
  logic at_limit;
  int checks = 0, failures = 0;

  rate_controller dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, bias;
    bit hit_hi, hit_lo;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(p == 887, $sformatf("reset value %0d", p));
    m = 887; hit_hi = 0; hit_lo = 0;
    for (int i = 0; i < 30000; i++) begin
      bias = (i / 3000) % 2;          // alternate long up and down runs
      carry  <= ($urandom % 10) < (bias ? 6 : 1);
      borrow <= 1'b0;
      if ($urandom % 10 < (bias ? 1 : 6)) begin carry <= 1'b0; borrow <= 1'b1; end
      @(posedge clk); #1;
      if (carry && m < 983) m++;
      else if (borrow && m > 790) m--;
      check(p == m, $sformatf("P %0d expected %0d", p, m));
      check(at_limit == (m == 983 || m == 790), "limit flag");
      if (m == 983) hit_hi = 1;
      if (m == 790) hit_lo = 1;
    end
    check(hit_hi && hit_lo, "both limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
