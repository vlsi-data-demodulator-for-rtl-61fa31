// Testbench for freq_divider: measures the spacing of every tick output.
// Each tick must recur exactly every DIV clocks (4, 13, 17, 34, 68) and be one
// cycle wide; over 6800 clocks each output must give 6800/DIV ticks.
module tb_freq_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en_fc, en_mix, en_4m, en_2m, en_1m;
  int checks = 0, failures = 0;

  freq_divider dut (.*);
  always #5 clk = ~clk;

  localparam int NCLK = 6800;
  int div[5] = '{4, 13, 17, 34, 68};
  int last[5], cnt[5];

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
    logic [4:0] t;
    foreach (last[i]) begin last[i] = -1; cnt[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < NCLK; c++) begin
      @(posedge clk); #1;
      t = {en_1m, en_2m, en_4m, en_mix, en_fc};
      for (int i = 0; i < 5; i++) if (t[i]) begin
        if (last[i] >= 0)
          check(c - last[i] == div[i], $sformatf("output %0d spacing %0d, expected %0d", i, c - last[i], div[i]));
        last[i] = c;
        cnt[i]++;
      end
    end
    for (int i = 0; i < 5; i++)
      check(cnt[i] == NCLK / div[i], $sformatf("output %0d gave %0d ticks, expected %0d", i, cnt[i], NCLK / div[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
