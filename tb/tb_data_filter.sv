// Testbench for data_filter, mode by mode, with the timing the document gives.
//  FM_LOCK: from the mid value 128 a constant u_d = 0 (or 1) raises lock after
//    exactly 97 ticks, at the lower threshold 31 (upper 225); an alternating
//    u_d never locks.
//  FM_EDGE: entering the mode from a high lock count starts at 31; a
//    transition of u_d to 0 gives one trigger exactly 16 ticks later; level
//    still holds the old bit at the trigger and flips on the next tick; the
//    count saturates at 0 and 31. Going back up, the trigger again comes 16
//    ticks after the transition.
//  FM_DUMP: over 128 ticks with a known number of ones the count ends at
//    128 + ones - zeros (8-bit saturating) and the level gives its sign; dump
//    returns it to 128.
// A random run then compares the counter with a saturating reference counter
// in every mode.
module tb_data_filter;
  import mls_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, clear = 1'b0, dump = 1'b0, u_d = 1'b0;
  filt_mode_e mode = FM_LOCK;
  logic lock, trigger, level;
  logic [7:0] count;
  int checks = 0, failures = 0;

  data_filter dut (.*);
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

  // one tick with the given u_d; returns trigger seen
  task automatic do_tick(input logic v, output bit trig);
    u_d <= v; tick <= 1'b1;
    @(posedge clk); #1;
    tick <= 1'b0;
    trig = trigger;
    @(posedge clk); #1;
    trig |= trigger;
  endtask

  task automatic do_clear(input filt_mode_e m);
    mode <= m; clear <= 1'b1;
    @(posedge clk); #1;
    clear <= 1'b0;
  endtask

  initial begin
    bit tr;
    int n, m, ones;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(count == 128, "reset at mid value");
    // ---- lock detection, lower threshold
    n = 0;
    while (!lock && n < 300) begin do_tick(1'b0, tr); n++; end
    check(n == 97 && count == 31, $sformatf("lock after %0d ticks at %0d, expected 97 at 31", n, count));
    // ---- lock detection, upper threshold
    do_clear(FM_LOCK);
    n = 0;
    while (!lock && n < 300) begin do_tick(1'b1, tr); n++; end
    check(n == 97 && count == 225, $sformatf("lock after %0d ticks at %0d, expected 97 at 225", n, count));
    // ---- no lock on an unlocked beat
    do_clear(FM_LOCK);
    for (int i = 0; i < 1000; i++) begin do_tick(1'((i / 10) % 2), tr); check(!lock, "no false lock"); end
    // ---- edge detection, entered from the upper lock count
    do_clear(FM_LOCK);
    for (int i = 0; i < 100; i++) do_tick(1'b1, tr);
    do_clear(FM_EDGE);
    check(count == 31 && level && !lock, $sformatf("edge mode starts at 31 (%0d)", count));
    for (int i = 0; i < 5; i++) begin do_tick(1'b1, tr); check(!tr && count == 31, "saturates at 31"); end
    n = 0; tr = 0;
    while (!tr && n < 100) begin do_tick(1'b0, tr); n++; end
    check(n == 16 && level, $sformatf("falling trigger after %0d ticks, expected 16, old level held", n));
    do_tick(1'b0, tr);
    check(!level, "level follows one tick after the trigger");
    for (int i = 0; i < 40; i++) begin do_tick(1'b0, tr); check(!tr, "one trigger per transition"); end
    check(count == 0, "saturates at 0");
    n = 0; tr = 0;
    while (!tr && n < 100) begin do_tick(1'b1, tr); n++; end
    check(n == 16 && !level, $sformatf("rising trigger after %0d ticks, expected 16, old level held", n));
    do_tick(1'b1, tr);
    check(level, "level follows one tick after the trigger");
    // ---- integrate and dump
    do_clear(FM_DUMP);
    check(count == 128, "dump mode starts at 128");
    for (int r = 0; r < 20; r++) begin
      ones = 0; m = 128;
      for (int i = 0; i < 128; i++) begin
        logic v;
        v = ($urandom % 100) < (r * 5);
        do_tick(v, tr);
        check(!tr, "no trigger in dump mode");
        ones += v;
        if (v) begin if (m < 255) m++; end else begin if (m > 0) m--; end
      end
      check(int'(count) == m, $sformatf("integral %0d expected %0d", count, m));
      check(level == (m >= 128), "sign of integral");
      dump <= 1'b1; @(posedge clk); #1; dump <= 1'b0;
      check(count == 128, "dump returns to 128");
    end
    // ---- random run against a reference counter
    begin
      int ref_c;
      filt_mode_e md;
      do_clear(FM_LOCK);
      ref_c = 128;
      for (int i = 0; i < 20000; i++) begin
        logic v;
        int top;
        if (i % 2500 == 0) begin
          md = filt_mode_e'((i / 2500) % 3);
          do_clear(md);
          if (md == FM_EDGE) ref_c = (ref_c >= 128) ? 31 : 0; else ref_c = 128;
        end
        v = 1'($urandom);
        do_tick(v, tr);
        top = (md == FM_EDGE) ? 31 : 255;
        if (v) begin if (ref_c < top) ref_c++; end else begin if (ref_c > 0) ref_c--; end
        check(int'(count) == ref_c, $sformatf("random run: count %0d expected %0d", count, ref_c));
        check(lock == (md == FM_LOCK && (ref_c >= 225 || ref_c <= 31)), "random run: lock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
