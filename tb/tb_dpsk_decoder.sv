// Testbench for dpsk_decoder: DPSK-encodes random bits (a 1 inverts the line
// level), feeds the levels with a d_clk pulse per bit, and checks that the
// decoded bits equal the sent bits, with valid one cycle after d_clk.
module tb_dpsk_decoder;
  logic clk = 1'b0, rst_n = 1'b0, d_clk = 1'b0, d_in = 1'b0;
  logic d_out, valid;
  int checks = 0, failures = 0;

  dpsk_decoder dut (.*);
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
    logic lvl;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    lvl = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      logic bt;
      bt = 1'($urandom);
      lvl ^= bt;
      d_in <= lvl; d_clk <= 1'b1;
      @(posedge clk); #1;
      d_clk <= 1'b0; d_in <= 1'($urandom);  // level between clocks is ignored
      check(valid, "valid after d_clk");
      if (i > 0) check(d_out == bt, $sformatf("bit %0d decoded %0b sent %0b", i, d_out, bt));
      @(posedge clk); #1;
      check(!valid, "valid is a single pulse");
      if (i > 0) check(d_out == bt, "decoded bit held");
      repeat ($urandom % 4) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
