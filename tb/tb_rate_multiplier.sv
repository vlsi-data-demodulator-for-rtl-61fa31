// Testbench for rate_multiplier: for several rates P, counts the output pulses
// over Q*8 enable ticks (exactly 8*P expected, eqn f = P/Q * f_c) and checks
// that consecutive pulses are never further apart than ceil(Q/P) ticks, the
// regular spacing of an accumulating rate multiplier.
module tb_rate_multiplier;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [10:0] p = 11'd887;
  logic rm_pulse;
  int checks = 0, failures = 0;

  rate_multiplier dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rates[6] = '{887, 790, 983, 1, 512, 1024};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (rates[r]) begin
      int n, gap, maxgap;
      p <= 11'(rates[r]);
      rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
      n = 0; gap = 0; maxgap = 0;
      for (int t = 0; t < 8 * 1024; t++) begin
        en <= 1'b1;
        #1;
        gap++;
        if (rm_pulse) begin n++; if (n > 1 && gap > maxgap) maxgap = gap; gap = 0; end
        @(posedge clk);
        en <= 1'b0;
        #1;
        check(!rm_pulse, "no pulse without enable");
        @(posedge clk);
      end
      check(n == 8 * rates[r], $sformatf("P=%0d: %0d pulses, expected %0d", rates[r], n, 8 * rates[r]));
      check(maxgap <= (1024 + rates[r] - 1) / rates[r], $sformatf("P=%0d: gap %0d", rates[r], maxgap));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
