// Testbench for k_counter. A reference model of the two divide-by-K counters
// runs beside the block on random enables, mode and count commands, and every
// carry and borrow pulse is compared cycle by cycle. Rate checks: with cb held
// at 0 and an enable every clock, carries come every 8 clocks in acquisition
// and every 64 in tracking; with cb at 1 the same holds for borrows.
module tb_k_counter;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, track = 1'b0, cb = 1'b0;
  logic carry, borrow;
  int checks = 0, failures = 0;

  k_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mc, mb;
  logic m_carry, m_borrow;
  task automatic model_step();
    int k;
    k = track ? 64 : 8;
    m_carry = 0; m_borrow = 0;
    if (en) begin
      if (!cb) begin if (mc >= k - 1) begin mc = 0; m_carry = 1; end else mc++; end
      else     begin if (mb >= k - 1) begin mb = 0; m_borrow = 1; end else mb++; end
    end
  endtask

  task automatic rate_test(input bit trk, input bit cmd, input int k);
    int last, n;
    last = -1; n = 0;
    track <= trk; cb <= cmd; en <= 1'b1;
    for (int c = 0; c < 20 * k; c++) begin
      @(posedge clk); #1;
      if (cmd ? borrow : carry) begin
        if (last >= 0) check(c - last == k, $sformatf("pulse spacing %0d, expected %0d", c - last, k));
        last = c; n++;
      end
      check(!(cmd ? carry : borrow), "no pulse of the other kind");
    end
    check(n >= 19, "pulse count");
  endtask

  initial begin
    mc = 0; mb = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 20000; i++) begin
      en    <= 1'($urandom % 4 == 0);
      cb    <= 1'($urandom % 5 < 2);
      if (i % 3000 == 0) track <= ~track;
      @(posedge clk); #1;
      model_step();
      check(carry == m_carry && borrow == m_borrow,
            $sformatf("cycle %0d carry %0b/%0b borrow %0b/%0b", i, carry, m_carry, borrow, m_borrow));
    end
    rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    rate_test(1'b0, 1'b0, 8);
    rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    rate_test(1'b1, 1'b0, 64);
    rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    rate_test(1'b1, 1'b1, 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
