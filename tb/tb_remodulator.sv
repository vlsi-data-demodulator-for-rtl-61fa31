// Testbench for remodulator: random input, Out_I, Out_Q and q_rise; checks
// the demodulated bit, the sample-and-hold, and the phase detector output
// u_i xor (u_s xor out_q) against a reference model every cycle. Also checks
// that a 180-degree reversal of the input, once sampled, leaves the phase
// detector output unchanged (modulation removal).
module tb_remodulator;
  logic clk = 1'b0, rst_n = 1'b0, u_i = 1'b0, out_i = 1'b0, out_q = 1'b0, q_rise = 1'b0;
  logic u_d, u_s, cb;
  int checks = 0, failures = 0;

  remodulator dut (.*);
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
    logic ms, cb0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    ms = 1'b0;
    for (int c = 0; c < 5000; c++) begin
      u_i <= 1'($urandom); out_i <= 1'($urandom); out_q <= 1'($urandom);
      q_rise <= 1'($urandom % 4 == 0);
      #1;
      check(u_d == (u_i ^ out_i), "demodulating xor");
      check(cb == (u_i ^ ms ^ out_q), "phase detector");
      @(posedge clk); #1;
      if (q_rise) ms = u_i ^ out_i;
      check(u_s == ms, "sample and hold");
    end
    // modulation removal: in phase, then the input reverses
    out_i <= 1'b1; out_q <= 1'b0; u_i <= 1'b1; q_rise <= 1'b1;
    @(posedge clk); #1;
    q_rise <= 1'b0;
    #1 cb0 = cb;
    u_i <= 1'b0; q_rise <= 1'b1;      // reversed input, sampled
    @(posedge clk); #1;
    q_rise <= 1'b0; #1;
    check(cb == cb0, "phase reversal removed from the loop error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
