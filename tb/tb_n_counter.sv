// Testbench for n_counter: applies id_step pulses at random spacing and
// checks that Out_I is a square wave of 2N = 64 steps per period (divide by N
// of ID_out), that Out_Q is the same wave 16 steps (a quarter period) earlier,
// and that q_rise marks exactly the rising edges of Out_Q.
module tb_n_counter;
  logic clk = 1'b0, rst_n = 1'b0, id_step = 1'b0;
  logic out_i, out_q, q_rise;
  int checks = 0, failures = 0;

  n_counter dut (.*);
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
    int steps;
    logic q_prev, exp_i, exp_q;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    steps = 0; q_prev = out_q;
    for (int c = 0; c < 20000; c++) begin
      id_step <= 1'($urandom % 3 == 0);
      @(posedge clk); #1;
      if (id_step) steps++;
      // steps counted from reset: I high in the second half of each 64,
      // Q high from step 16 to step 47
      exp_i = (steps % 64) >= 32;
      exp_q = ((steps % 64) >= 16) && ((steps % 64) < 48);
      check(out_i == exp_i, $sformatf("out_i at step %0d", steps));
      check(out_q == exp_q, $sformatf("out_q at step %0d", steps));
      check(q_rise == (out_q && !q_prev), "q_rise");
      q_prev = out_q;
    end
    check(steps > 6000, "enough steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
