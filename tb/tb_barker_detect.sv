// Testbench for barker_detect: random bit streams with and without the code
// 11101; found must pulse exactly when the last five bits received are
// 1,1,1,0,1 (first received first), and clear must empty the history.
module tb_barker_detect;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0, bit_in = 1'b0;
  logic found;
  int checks = 0, failures = 0;

  barker_detect dut (.*);
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
    bit hist[$];
    int nfound;
    logic seq[5] = '{1, 1, 1, 0, 1};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    nfound = 0;
    for (int i = 0; i < 4000; i++) begin
      logic bt;
      bit exp;
      // every 50 bits insert the code
      bt = ((i % 50) < 5) ? seq[i % 50] : 1'($urandom);
      valid <= 1'b1; bit_in <= bt;
      @(posedge clk); #1;
      valid <= 1'b0; bit_in <= 1'b1;
      hist.push_back(bt);
      if (hist.size() > 5) void'(hist.pop_front());
      exp = hist.size() == 5 && hist[0] && hist[1] && hist[2] && !hist[3] && hist[4];
      check(found == exp, $sformatf("bit %0d found %0b expected %0b", i, found, exp));
      if (found) nfound++;
      @(posedge clk); #1;
      check(!found, "found is a single pulse");
    end
    check(nfound >= 80, "code found each time it was sent");
    // clear: four code bits, clear, last code bit -> no detection
    for (int i = 0; i < 4; i++) begin valid <= 1'b1; bit_in <= seq[i]; @(posedge clk); end
    valid <= 1'b0; clear <= 1'b1; @(posedge clk); clear <= 1'b0;
    valid <= 1'b1; bit_in <= 1'b1; @(posedge clk); #1; valid <= 1'b0;
    check(!found, "clear empties the history");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
