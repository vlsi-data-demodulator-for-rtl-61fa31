// Bit error rate run of the complete demodulator in Gaussian noise.
//
// Each packet is 13 bits of carrier, the Barker code and PKT_BITS data bits
// (DPSK, 64 us per bit), on an IF near 5 MHz whose mixer product is 230 kHz
// with a random carrier offset within +-25 kHz. The receiver is restarted
// before each packet. Noise is band-limited white Gaussian noise: two independent
// Gaussian sequences (Box-Muller from $urandom) pass through second-order
// Butterworth lowpass filters of 75 kHz and modulate the carrier in
// quadrature, so the noise occupies 150 kHz around it. The sum of signal and
// noise is hard-limited. SNR is signal power over noise power in that band.
// Because the mixer only looks at the IF at 5.23 MHz, the IF is evaluated
// once per 13 clocks and held in between.
// For each SNR point the bytes read at the interrupts are compared with the
// sent bits; a missing byte counts as 8 errors, so a packet whose Barker code
// is missed costs most of its bits. The run reports the measured BER and the
// number of packets received per point, and separately the errors within the
// packets that were received (the pure filtering errors, without the losses
// of synchronisation), and checks them against loose bounds:
// every packet and BER <= 5e-3 at 5 dB, BER <= 5e-2 / 1.5e-1 / 2e-1 and at
// least 80 / 80 / 60 % of the packets at 4 / 3 / 2 dB.
`timescale 1ns/1ps
module tb_ber_workload;
  import mls_pkg::*;

  localparam int  BIT_CLKS = 4352;
  localparam int  CW_BITS  = 13;
  localparam int  PKT_BITS = 80;      // 85 bits per run incl. the Barker code
  localparam int  NPKT     = 40;      // packets per SNR point
  localparam real FS       = 68.0e6 / 13.0;
  localparam real PI       = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, if_in = 1'b0, restart = 1'b0;
  logic [7:0] b, integrator;
  logic d_clk, int_o, lock;
  rx_state_e state;
  logic [PW-1:0] p_count;

  mls_demod_top dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- noise and IF synthesis ----------------
  real f_if = 5.0e6, sig_amp = 1.0, noise_sd = 0.0;
  real t_now = 0.0, data_ph = 0.0;
  // Butterworth biquad, fc = 75 kHz at FS (bilinear transform)
  real b0, b1, b2, a1, a2;
  real xi1 = 0, xi2 = 0, yi1 = 0, yi2 = 0, xq1 = 0, xq2 = 0, yq1 = 0, yq2 = 0;
  real filt_gain = 1.0;   // output sd per unit input sd, measured at start

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  task automatic filt_step(output real ni, output real nq);
    real xi, xq, yi, yq;
    xi = gauss(); xq = gauss();
    yi = b0 * xi + b1 * xi1 + b2 * xi2 - a1 * yi1 - a2 * yi2;
    yq = b0 * xq + b1 * xq1 + b2 * xq2 - a1 * yq1 - a2 * yq2;
    xi2 = xi1; xi1 = xi; yi2 = yi1; yi1 = yi;
    xq2 = xq1; xq1 = xq; yq2 = yq1; yq1 = yq;
    ni = yi; nq = yq;
  endtask

  int win = 0;
  always @(posedge clk) begin
    real ni, nq, th, v;
    t_now += 1.0 / 68.0e6;
    win = (win == 12) ? 0 : win + 1;
    if (win == 0) begin
      th = 2.0 * PI * f_if * t_now;
      v  = sig_amp * $cos(th + data_ph);
      if (noise_sd > 0.0) begin
        filt_step(ni, nq);
        v += noise_sd / filt_gain * (ni * $cos(th) - nq * $sin(th));
      end
      if_in <= (v > 0.0);
    end
  end

  // ---------------- byte capture ----------------
  logic int_d = 1'b0;
  logic [7:0] got[$];
  always @(posedge clk) begin
    int_d <= int_o;
    if (int_o && !int_d) got.push_back(b);
  end

  task automatic wait_clks(input int n);
    repeat (n) @(posedge clk);
  endtask

  // one packet; returns bit errors
  task automatic packet(output int errs, output bit ok);
    logic [PKT_BITS-1:0] data;
    int nb;
    for (int i = 0; i < PKT_BITS; i++) data[i] = 1'($urandom);
    f_if = 68.0e6 / 13.0 - 230.0e3 + real'(int'($urandom % 50001) - 25000);
    got.delete();
    @(posedge clk); restart <= 1'b1; @(posedge clk); restart <= 1'b0;
    wait_clks(CW_BITS * BIT_CLKS);
    for (int i = 0; i < 5 + PKT_BITS; i++) begin
      logic bt;
      bt = (i < 5) ? BARKER[4-i] : data[i-5];
      if (bt) data_ph = (data_ph == 0.0) ? PI : 0.0;
      wait_clks(BIT_CLKS);
    end
    wait_clks(BIT_CLKS);
    nb = PKT_BITS / 8;
    errs = 0;
    for (int k = 0; k < nb; k++) begin
      if (k < got.size()) begin
        for (int j = 0; j < 8; j++) errs += (got[k][j] != data[8*k + j]);
      end else errs += 8;
    end
    ok = (got.size() == nb);
  endtask

  initial begin
    wait_clks(400_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real snr_db[4] = '{5.0, 4.0, 3.0, 2.0};
    real bound[4]  = '{5.0e-3, 5.0e-2, 1.5e-1, 2.0e-1};
    int  min_ok[4] = '{NPKT, NPKT * 4 / 5, NPKT * 4 / 5, NPKT * 3 / 5};
    // filter coefficients
    begin
      real k, norm;
      k = $tan(PI * 75.0e3 / FS);
      norm = 1.0 / (1.0 + $sqrt(2.0) * k + k * k);
      b0 = k * k * norm; b1 = 2.0 * b0; b2 = b0;
      a1 = 2.0 * (k * k - 1.0) * norm;
      a2 = (1.0 - $sqrt(2.0) * k + k * k) * norm;
    end
    // measure the filter's noise gain
    begin
      real ni, nq, acc;
      acc = 0.0;
      for (int i = 0; i < 200000; i++) begin
        filt_step(ni, nq);
        if (i >= 1000) acc += ni * ni;
      end
      filt_gain = $sqrt(acc / 199000.0);
    end
    wait_clks(10);
    rst_n <= 1'b1;
    foreach (snr_db[s]) begin
      int errs, tot_err, tot_bits, okp, rx_err;
      bit ok;
      real ber;
      // signal power A^2/2 = 0.5; noise power = sd^2
      noise_sd = $sqrt(0.5 / $pow(10.0, snr_db[s] / 10.0));
      tot_err = 0; tot_bits = 0; okp = 0; rx_err = 0;
      for (int n = 0; n < NPKT; n++) begin
        packet(errs, ok);
        tot_err += errs; tot_bits += PKT_BITS / 8 * 8; okp += ok;
        if (ok) rx_err += errs;
      end
      ber = real'(tot_err) / real'(tot_bits);
      $display("SNR %0.1f dB: %0d errors in %0d bits, BER %0.2e, %0d of %0d packets received",
               snr_db[s], tot_err, tot_bits, ber, okp, NPKT);
      $display("  in the received packets: %0d errors in %0d bits",
               rx_err, okp * (PKT_BITS / 8 * 8));
      check(ber <= bound[s], $sformatf("BER %0.2e at %0.1f dB above %0.1e", ber, snr_db[s], bound[s]));
      check(okp >= min_ok[s], $sformatf("%0d of %0d packets received", okp, NPKT));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
