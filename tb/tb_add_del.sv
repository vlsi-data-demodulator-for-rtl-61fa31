// Testbench for add_del.
// Random run: enables every 4th clock (as f_c in the 68 MHz system), random
// rate-multiplier pulses on enable cycles, random carry and borrow pulses
// between them. Independently of the unit's scheme, the number of id_step
// pulses must equal rm pulses + carries - borrows to within the one request
// that may still be pending, id_out must toggle exactly on id_step, and steps
// may only occur on enable cycles.
// Directed runs: a carry adds a step in the next enable slot without an rm
// pulse (advance); a borrow swallows the next rm pulse (delay); a carry and a
// borrow cancel; at most three inserts wait for a free slot.
module tb_add_del;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, rm_pulse = 1'b0, carry = 1'b0, borrow = 1'b0;
  logic id_step, id_out;
  int checks = 0, failures = 0;

  add_del dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one f_c slot of 4 clocks: enable in the first, carry/borrow in the second
  task automatic slot(input bit rm, input bit c, input bit b, output int steps);
    logic prev_out;
    steps = 0;
    for (int k = 0; k < 4; k++) begin
      prev_out = id_out;
      en       <= (k == 0);
      rm_pulse <= (k == 0) && rm;
      carry    <= (k == 1) && c;
      borrow   <= (k == 1) && b;
      @(posedge clk); #1;
      if (id_step) steps++;
      check((id_out != prev_out) == id_step, "id_out toggles with id_step");
      check(!id_step || k == 0, "step one clock after the enable");
    end
  endtask

  initial begin
    int n_rm, n_c, n_b, n_step, s, diff, base, tot;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    n_rm = 0; n_c = 0; n_b = 0; n_step = 0;
    for (int i = 0; i < 20000; i++) begin
      bit rm, c, b;
      // as in the loop: a request at most every 4th slot, and a free slot
      // (no rm pulse) in every 4th slot, so requests never pile up
      rm = (i % 4 != 3) && (($urandom % 8) != 0);
      c  = (i % 4 == 0) && (($urandom % 3) == 0);
      b  = (i % 4 == 0) && !c && (($urandom % 2) == 0);
      slot(rm, c, b, s);
      n_step += s; n_rm += rm; n_c += c; n_b += b;
    end
    // drain requests with plain slots
    for (int i = 0; i < 4; i++) begin
      slot(i >= 2, 1'b0, 1'b0, s); n_step += s; n_rm += (i >= 2);
    end
    diff = n_step - (n_rm + n_c - n_b);
    check(diff == 0, $sformatf("steps %0d vs rm+carry-borrow %0d", n_step, n_rm + n_c - n_b));
    // directed: advance. Slots without rm pulse: a carry gives one extra step.
    slot(1'b0, 1'b1, 1'b0, s);
    tot = 0;
    slot(1'b0, 1'b0, 1'b0, s); tot += s;
    slot(1'b0, 1'b0, 1'b0, s); tot += s;
    check(tot == 1, $sformatf("carry inserts one step (%0d)", tot));
    // directed: delay. Four rm slots after a borrow give three steps.
    slot(1'b1, 1'b0, 1'b1, s); base = s;
    tot = 0;
    for (int i = 0; i < 4; i++) begin slot(1'b1, 1'b0, 1'b0, s); tot += s; end
    check(base == 1 && tot == 3, $sformatf("borrow deletes one step (%0d,%0d)", base, tot));
    // carry then borrow cancel
    slot(1'b0, 1'b1, 1'b0, s);
    // the carry is taken in the next empty slot; make the next slot busy
    slot(1'b1, 1'b0, 1'b1, s);
    tot = s;
    for (int i = 0; i < 3; i++) begin slot(1'b1, 1'b0, 1'b0, s); tot += s; end
    check(tot == 4, $sformatf("carry and borrow cancel (%0d)", tot));
    // saturation: five carries while every slot is busy keep only REQ_MAX = 3
    for (int i = 0; i < 5; i++) begin slot(1'b1, 1'b1, 1'b0, s); end
    tot = 0;
    for (int i = 0; i < 6; i++) begin slot(1'b0, 1'b0, 1'b0, s); tot += s; end
    check(tot == 3, $sformatf("pending inserts saturate at 3 (%0d)", tot));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
