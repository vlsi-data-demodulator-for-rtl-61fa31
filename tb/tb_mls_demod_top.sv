// End-to-end test of the MLS data demodulator at its default parameters.
//
// A DPSK-modulated, hard-limited IF near 5 MHz is synthesised from a 32-bit
// phase accumulator running at the 68 MHz clock rate (one clk period is one
// time unit). Each packet is 13 bits of unmodulated carrier, the Barker code
// 11101 and then DATA_BITS bits (function identification and data), every bit
// 64 us = 4352 clocks long, with a 1 in the bit stream sent as a 180-degree
// phase reversal at the start of the bit. Optional phase noise flips the IF
// level near its edges.
// The test sends packets at several carrier offsets, restarting the receiver
// between packets, and checks: lock within the 832 us acquisition interval;
// arrival in tracking mode; every byte read at an interrupt against the sent
// bits; the rate count staying inside its limits; and, with a carrier outside
// the 205..255 kHz range, that the rate count stops at its limit. It counts how
// often each mechanism (carry, borrow, lock, edge trigger, Barker, mode
// switch, byte interrupt, rate limit, restart) occurred.
`timescale 1ns/1ps
module tb_mls_demod_top;
  import mls_pkg::*;

  localparam int BIT_CLKS  = 4352;       // 64 us at 68 MHz
  localparam int CW_BITS   = 13;         // 832 us carrier acquisition
  localparam int DATA_BITS = 27;         // 32-bit basic word minus Barker
  localparam int ACQ_LIMIT = CW_BITS * BIT_CLKS;

  logic clk = 1'b0, rst_n = 1'b0, if_in = 1'b0, restart = 1'b0;
  logic [7:0] b;
  logic d_clk, int_o, lock;
  rx_state_e state;
  logic [PW-1:0] p_count;
  logic [7:0] integrator;

  mls_demod_top dut (.*);

  always #1 clk = ~clk;   // one clock = 2 time units

  int checks = 0, failures = 0;
  int n_carry = 0, n_borrow = 0, n_trig = 0, n_barker = 0, n_lock = 0;
  int n_track = 0, n_int = 0, n_limit = 0, n_restart = 0, n_k_switch = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- IF synthesis ----------------
  logic [31:0] ph = 32'h0, inc = 32'h0;
  logic        flip = 1'b0;       // DPSK phase state
  int          noise_ppm = 0;     // probability of a level error near edges
  always @(posedge clk) begin
    logic lvl;
    ph <= ph + inc;
    lvl = ph[31] ^ flip;
    // noise: near an edge of the IF wave, flip the sample at random
    if (noise_ppm > 0 && (ph[30:26] == 5'h1f || ph[30:26] == 5'h00) &&
        ($urandom % 1000000) < noise_ppm)
      lvl = ~lvl;
    if_in <= lvl;
  end

  function automatic logic [31:0] inc_of(input real f_hz);
    return 32'(longint'(f_hz / 68.0e6 * 4294967296.0));
  endfunction

  // ---------------- event counting ----------------
  logic track_d = 1'b0, lock_d = 1'b0;
  bit   hit_max = 0, hit_min = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_pll.carry)  n_carry++;
    if (dut.u_pll.borrow) n_borrow++;
    if (dut.u_filt.trigger) n_trig++;
    if (dut.u_bark.found && state == ST_SYNC) n_barker++;
    if (lock && !lock_d && state == ST_ACQ) n_lock++;
    if (dut.track != track_d) n_k_switch++;
    if (p_count == PW'(P_MAX)) hit_max = 1;
    if (p_count == PW'(P_MIN)) hit_min = 1;
    track_d <= dut.track;
    lock_d  <= lock;
    if (p_count > PW'(P_MAX) || p_count < PW'(P_MIN)) begin
      failures++; checks++;
      $display("FAIL: rate count %0d out of range", p_count);
    end
  end

  // bytes captured at interrupts
  logic int_d = 1'b0;
  logic [7:0] got_bytes[$];
  always @(posedge clk) begin
    int_d <= int_o;
    if (int_o && !int_d) begin
      n_int++;
      got_bytes.push_back(b);
    end
  end

  task automatic wait_clks(input int n);
    repeat (n) @(posedge clk);
  endtask

  // send one packet; returns the cycle at which lock was seen
  task automatic send_packet(input real f_if, input int noise, output int lock_at);
    logic [DATA_BITS-1:0] data;
    logic [7:0] exp_b;
    int t0, nbytes;
    bit saw_lock, saw_track;
    lock_at = -1;
    saw_lock = 0; saw_track = 0;
    for (int i = 0; i < DATA_BITS; i++) data[i] = 1'($urandom);
    got_bytes.delete();
    inc = inc_of(f_if);
    noise_ppm = noise;
    // carrier acquisition bits
    t0 = 0;
    for (int i = 0; i < CW_BITS * BIT_CLKS; i++) begin
      @(posedge clk);
      if (!saw_lock && state != ST_ACQ) begin saw_lock = 1; lock_at = t0; end
      t0++;
    end
    check(saw_lock, $sformatf("lock within 832 us at IF %0.0f Hz", f_if));
    // Barker code then data, DPSK: a 1 reverses the phase
    for (int i = 0; i < 5 + DATA_BITS; i++) begin
      logic bt;
      bt = (i < 5) ? BARKER[4-i] : data[i-5];
      if (bt) flip = ~flip;
      for (int c = 0; c < BIT_CLKS; c++) begin
        @(posedge clk);
        if (state == ST_TRACK) saw_track = 1;
      end
    end
    // a further bit of carrier so that the last bit is clocked out
    wait_clks(BIT_CLKS);
    check(saw_track, "reached tracking mode");
    if (saw_track) n_track++;
    nbytes = DATA_BITS / 8;
    check(got_bytes.size() == nbytes,
          $sformatf("%0d byte interrupts, expected %0d", got_bytes.size(), nbytes));
    for (int k = 0; k < nbytes && k < got_bytes.size(); k++) begin
      for (int j = 0; j < 8; j++) exp_b[j] = data[8*k + j];
      check(got_bytes[k] == exp_b,
            $sformatf("byte %0d got %02h expected %02h", k, got_bytes[k], exp_b));
    end
  endtask

  task automatic do_restart();
    @(posedge clk); restart <= 1'b1;
    @(posedge clk); restart <= 1'b0;
    n_restart++;
  endtask

  // watchdog
  initial begin
    wait_clks(4_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int la;
    wait_clks(10);
    rst_n <= 1'b1;
    // packet 1: carrier 20 kHz above the IF nominal -> loop ~211 kHz
    send_packet(5.020e6, 0, la);
    $display("packet 1: lock after %0d us", la / 68);
    do_restart();
    // packet 2: 20 kHz below -> ~251 kHz, with phase noise
    send_packet(4.980e6, 20000, la);
    $display("packet 2: lock after %0d us", la / 68);
    do_restart();
    // packet 3: nominal
    send_packet(5.000e6, 0, la);
    $display("packet 3: lock after %0d us", la / 68);
    // carrier far outside the range: loop must stop at the rate limit
    do_restart();
    hit_max = 0; hit_min = 0;
    inc = inc_of(4.930e6);   // ~301 kHz
    wait_clks(68_000);       // 1 ms
    check(hit_max, "rate count reached its upper limit");
    if (hit_max) n_limit++;
    inc = inc_of(5.035e6);   // ~196 kHz
    wait_clks(68_000);
    check(hit_min, "rate count reached its lower limit");
    if (hit_min) n_limit++;

    $display("events: carry=%0d borrow=%0d lock=%0d trigger=%0d barker=%0d track=%0d k_switch=%0d int=%0d limit=%0d restart=%0d",
             n_carry, n_borrow, n_lock, n_trig, n_barker, n_track, n_k_switch, n_int, n_limit, n_restart);
    check(n_carry > 0, "carry occurred");
    check(n_borrow > 0, "borrow occurred");
    check(n_lock > 0, "lock detected");
    check(n_trig > 0, "edge trigger occurred");
    check(n_barker > 0, "Barker code found");
    check(n_track > 0, "tracking mode reached");
    check(n_k_switch > 0, "loop bandwidth switched");
    check(n_int > 0, "byte interrupt raised");
    check(n_limit > 0, "rate limit reached");
    check(n_restart > 0, "restart applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
