// Testbench for data_clock_sync with 4 MHz ticks every 17 clocks (68 MHz).
// Checks the free-running bit period (256 ticks = 64 us) and that after a
// trigger the next d_clk comes 240 ticks (60 us) later, i.e. 64 us after a
// transition detected with the 4 us delay; later edges follow every 256.
// A trigger that arrives 10 ticks before a scheduled edge must issue that
// edge at once and then restart the count from the same preset.
module tb_data_clock_sync;
  logic clk = 1'b0, rst_n = 1'b0, en_4m = 1'b0, trigger = 1'b0;
  logic d_clk;
  int checks = 0, failures = 0;

  data_clock_sync dut (.*);
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

  int ticks = 0, last_dclk = -1, dcount = 0;
  int divc = 0;
  always @(posedge clk) if (rst_n) begin
    divc  <= (divc == 16) ? 0 : divc + 1;
    en_4m <= (divc == 16);
    if (en_4m) ticks <= ticks + 1;
  end

  task automatic wait_dclk(output int at);
    do @(posedge clk); while (!d_clk);
    at = ticks;
  endtask

  initial begin
    int a, b, t0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait_dclk(a);
    for (int i = 0; i < 5; i++) begin
      wait_dclk(b);
      check(b - a == 256, $sformatf("free-running period %0d ticks", b - a));
      a = b;
    end
    // trigger in the middle of a bit, just after a tick
    repeat (100 * 17 + 3) @(posedge clk);
    @(posedge clk iff en_4m);
    trigger <= 1'b1; t0 = ticks + 1;   // ticks counts this tick at this edge
    @(posedge clk); trigger <= 1'b0;
    wait_dclk(b);
    check(b - t0 == 240, $sformatf("first edge %0d ticks after trigger, expected 240", b - t0));
    a = b;
    for (int i = 0; i < 3; i++) begin
      wait_dclk(b);
      check(b - a == 256, $sformatf("period after trigger %0d", b - a));
      a = b;
    end
    // late trigger: the edge is due in 10 ticks, so it is issued at once and
    // the counter restarts from the preset
    do @(posedge clk iff en_4m); while (ticks + 1 - a < 246);
    trigger <= 1'b1; t0 = ticks + 1;
    check(t0 - a == 246, $sformatf("late trigger placed %0d ticks after the edge", t0 - a));
    @(posedge clk); trigger <= 1'b0;
    #1;
    check(d_clk, "late trigger issues the due edge at once");
    repeat (2) @(posedge clk);
    wait_dclk(b);
    check(b - t0 == 240, $sformatf("edge %0d ticks after late trigger, expected 240", b - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
