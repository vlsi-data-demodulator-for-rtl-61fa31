// Testbench for bit_counter: random bit pulses with random gaps; int_o must
// rise on every 8th bit counted since clear, stay high until the next bit and
// ignore bits while enable is low.
module tb_bit_counter;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, enable = 1'b0, valid = 1'b0;
  logic int_o;
  int checks = 0, failures = 0;

  bit_counter dut (.*);
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
    int n, ints;
    bit exp_int;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    clear <= 1'b1; @(posedge clk); clear <= 1'b0;
    n = 0; ints = 0; exp_int = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i == 1000) begin clear <= 1'b1; @(posedge clk); #1; clear <= 1'b0; n = 0; exp_int = 0; end
      enable <= !(i >= 2000 && i < 2200);
      valid  <= 1'b1;
      @(posedge clk); #1;
      valid <= 1'b0;
      if (enable) begin n++; exp_int = (n % 8 == 0); end
      for (int g = 0; g < 1 + $urandom % 4; g++) begin
        check(int_o == exp_int, $sformatf("bit %0d int %0b expected %0b", n, int_o, exp_int));
        @(posedge clk); #1;
      end
      if (int_o) ints++;
    end
    check(ints > 300, "interrupts raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
