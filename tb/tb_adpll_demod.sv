// Testbench for adpll_demod, the ADPLL with remodulation branch.
// The input is a square wave from a phase accumulator at the 68 MHz clock
// rate, with en_fc every 4th clock (f_c = 17 MHz). For several input
// frequencies inside 205..255 kHz the loop runs in acquisition (K = 8) for
// 0.5 ms and then in tracking (K = 64) for 1 ms. Checks:
//  - the rate count settles to P = f * 2 * N * Q / f_c (within +-6 counts, the
//    loop's limit-cycle ripple), i.e. frequency lock;
//  - after lock the demodulated stream u_d is almost constant (phase lock, at
//    0 or 180 degrees) and, when 180-degree reversals are applied to the
//    input every 64 us, u_d follows them: each reversal flips the
//    majority level of u_d;
//  - the loop keeps lock through the reversals (the remodulation branch
//    removes the modulation from the loop).
module tb_adpll_demod;
  import mls_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en_fc = 1'b0, track = 1'b0, u_i = 1'b0;
  logic u_d, out_i, out_q, carry, borrow, p_limit;
  logic [PW-1:0] p;
  int checks = 0, failures = 0;

  adpll_demod dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ph = 0, inc = 0;
  logic flip = 1'b0;
  int div = 0;
  always @(posedge clk) begin
    ph    <= ph + inc;
    u_i   <= ph[31] ^ flip;
    div   <= (div == 3) ? 0 : div + 1;
    en_fc <= (div == 3);
  end

  initial begin
    real freqs[3] = '{230.0e3, 210.0e3, 250.0e3};
    repeat (3) @(posedge clk);
    foreach (freqs[f]) begin
      real pexp;
      int ones, tot, lvl_prev, flips_seen;
      rst_n <= 1'b0; track <= 1'b0;
      inc = 32'(longint'(freqs[f] / 68.0e6 * 4294967296.0));
      @(posedge clk); rst_n <= 1'b1;
      repeat (34000) @(posedge clk);           // 0.5 ms acquisition
      track <= 1'b1;
      repeat (34000) @(posedge clk);           // 0.5 ms tracking
      pexp = freqs[f] * 2.0 * 32.0 * 1024.0 / 17.0e6;
      check(real'(p) > pexp - 6.0 && real'(p) < pexp + 6.0,
            $sformatf("f=%0.0f: P=%0d expected %0.1f", freqs[f], p, pexp));
      // phase lock: u_d nearly constant over 64 us
      ones = 0;
      for (int c = 0; c < 4352; c++) begin @(posedge clk); ones += u_d; end
      check(ones < 435 || ones > 3917, $sformatf("f=%0.0f: u_d ones %0d of 4352", freqs[f], ones));
      lvl_prev = (ones > 2176);
      // data: reverse the input phase at the start of each bit, 8 bits
      flips_seen = 0;
      for (int bt = 0; bt < 8; bt++) begin
        bit rev;
        rev = 1'($urandom);
        if (rev) flip = ~flip;
        ones = 0;
        for (int c = 0; c < 4352; c++) begin
          @(posedge clk);
          if (c >= 400) ones += u_d;
        end
        tot = 4352 - 400;
        check(ones < tot / 10 || ones > tot - tot / 10,
              $sformatf("f=%0.0f bit %0d: u_d settled (%0d of %0d)", freqs[f], bt, ones, tot));
        check((ones > tot / 2) == (lvl_prev != rev),
              $sformatf("f=%0.0f bit %0d: level follows reversal", freqs[f], bt));
        lvl_prev = (ones > tot / 2);
      end
      check(real'(p) > pexp - 6.0 && real'(p) < pexp + 6.0,
            $sformatf("f=%0.0f: lock kept, P=%0d", freqs[f], p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
