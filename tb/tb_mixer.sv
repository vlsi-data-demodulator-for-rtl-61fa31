// Testbench for mixer: random IF levels and sampling ticks; the output must
// equal the IF level at the last tick and change only after a tick. Also
// mixes a 5.000 MHz square wave with 68/13 MHz sampling and checks the
// output frequency (68/13 - 5 MHz = 230.8 kHz) by counting rising edges.
module tb_mixer;
  logic clk = 1'b0, rst_n = 1'b0, en_mix = 1'b0, if_in = 1'b0, mix_out;
  int checks = 0, failures = 0;

  mixer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    int rises, divc;
    logic [31:0] ph;
    logic prev;
    model = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      en_mix <= 1'($urandom % 3 == 0);
      if_in  <= 1'($urandom);
      @(posedge clk); #1;
      if (en_mix) model = if_in;
      check(mix_out == model, "sampled level");
    end
    // frequency translation: 1 ms of 68 MHz clocks
    ph = 0; rises = 0; divc = 0; prev = mix_out;
    for (int c = 0; c < 68000; c++) begin
      ph = ph + 32'd315806585;   // 5.000 MHz / 68 MHz * 2^32
      if_in  <= ph[31];
      en_mix <= (divc == 12);
      divc = (divc == 12) ? 0 : divc + 1;
      @(posedge clk); #1;
      if (mix_out && !prev) rises++;
      prev = mix_out;
    end
    check(rises >= 229 && rises <= 232, $sformatf("%0d rising edges in 1 ms, expected ~231", rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
