// Testbench for demod_controller: walks the modes acquisition -> sync ->
// tracking and back on restart, checking the ADPLL mode, the filter mode,
// which clock tick is passed to the filter, and the reset_1/reset_2 pulses.
// lock outside acquisition and Barker outside sync must be ignored.
module tb_demod_controller;
  import mls_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, lock = 1'b0, barker = 1'b0;
  logic en_1m = 1'b0, en_4m = 1'b0, en_2m = 1'b0;
  logic track, filt_tick, reset_1, reset_2;
  filt_mode_e filt_mode;
  rx_state_e state;
  int checks = 0, failures = 0;

  demod_controller dut (.*);
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

  // check the outputs that belong to a mode, with random ticks
  task automatic expect_mode(input rx_state_e s, input string tag);
    for (int i = 0; i < 50; i++) begin
      en_1m <= 1'($urandom); en_4m <= 1'($urandom); en_2m <= 1'($urandom);
      #1;
      check(state == s, {tag, ": state"});
      check(track == (s != ST_ACQ), {tag, ": ADPLL mode"});
      case (s)
        ST_ACQ:   check(filt_mode == FM_LOCK && filt_tick == en_1m, {tag, ": lock detector on 1 MHz"});
        ST_SYNC:  check(filt_mode == FM_EDGE && filt_tick == en_4m, {tag, ": edge detector on 4 MHz"});
        default:  check(filt_mode == FM_DUMP && filt_tick == en_2m, {tag, ": data filter on 2 MHz"});
      endcase
      @(posedge clk); #1;
      check(!reset_1 && !reset_2, {tag, ": no reset pulses while idle"});
    end
  endtask

  task automatic pulse(ref logic s, input bit exp_r1, input bit exp_r2, input string tag);
    s = 1'b1;
    @(posedge clk); #1;
    s = 1'b0;
    check(reset_1 == exp_r1 && reset_2 == exp_r2, {tag, ": reset pulses"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    expect_mode(ST_ACQ, "after reset");
    pulse(barker, 1'b0, 1'b0, "barker in acq");
    expect_mode(ST_ACQ, "barker ignored in acq");
    pulse(lock, 1'b1, 1'b0, "lock");
    expect_mode(ST_SYNC, "sync");
    pulse(lock, 1'b0, 1'b0, "lock in sync");
    expect_mode(ST_SYNC, "lock ignored in sync");
    pulse(barker, 1'b1, 1'b1, "barker");
    expect_mode(ST_TRACK, "tracking");
    pulse(lock, 1'b0, 1'b0, "lock in track");
    pulse(barker, 1'b0, 1'b0, "barker in track");
    expect_mode(ST_TRACK, "tracking holds");
    pulse(restart, 1'b1, 1'b0, "restart");
    expect_mode(ST_ACQ, "after restart");
    pulse(lock, 1'b1, 1'b0, "lock again");
    pulse(restart, 1'b1, 1'b0, "restart from sync");
    expect_mode(ST_ACQ, "restart from sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
