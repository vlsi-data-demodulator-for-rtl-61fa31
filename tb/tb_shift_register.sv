// Testbench for shift_register: after each group of eight random bits, b[0]
// must hold the first bit of the group and b[7] the last; the register must
// not move without valid.
module tb_shift_register;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, bit_in = 1'b0;
  logic [7:0] b;
  int checks = 0, failures = 0;

  shift_register dut (.*);
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
    logic [7:0] exp_b, hold;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(b == 8'h00, "reset");
    for (int g = 0; g < 500; g++) begin
      for (int k = 0; k < 8; k++) begin
        exp_b[k] = 1'($urandom);
        valid <= 1'b1; bit_in <= exp_b[k];
        @(posedge clk); #1;
        valid <= 1'b0; bit_in <= 1'($urandom);
        hold = b;
        repeat ($urandom % 3) @(posedge clk);
        #1 check(b == hold, "holds without valid");
      end
      check(b == exp_b, $sformatf("byte %02h expected %02h", b, exp_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
