// tb_loop_response: measures the closed-loop reference-to-output transfer
// function Vout/Vref of the controller and the behavioural buck converter at a
// few frequencies, at default parameters.
//
// Vref is 1.5 V plus a 50 mV sine. After the loop has settled at each
// frequency, vout is correlated with sin and cos over a whole number of sine
// periods (sampled every clock), giving the gain at that frequency.
// A first, constant-reference interval measures how much of the one-bit
// quantisation noise reaches the output.
// Checks: at low frequency the output follows the reference (gain within
// +/-1.5 dB of 0 dB at 100 Hz, -3..+1.5 dB at 300 Hz, DC level within 20 mV
// of 1.5 V); no more than 6 dB of peaking at 3 kHz; far above the loop
// bandwidth (40 kHz) the reference is strongly attenuated (below -15 dB).
module tb_loop_response;
  import dcdc_pkg::*;

  localparam realtime TCLK  = 7.8125ns;   // 128 MHz
  localparam real     TCLKS = 7.8125e-9;
  localparam real     PI    = 3.14159265358979;
  localparam real     AMP   = 0.050;      // sine amplitude, V

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  volt_uv_t   vref, vout;
  logic       pwm, period_start, sample_en, dsm_bit, at_max, at_min;
  logic [7:0] duty;
  real        vout_v, iload_a;
  int         checks = 0, failures = 0;

  always #(TCLK / 2) clk = ~clk;

  dsm_dcdc_controller u_dut (
    .clk(clk), .rst_n(rst_n), .vref(vref), .vout(vout), .pwm(pwm),
    .period_start(period_start), .sample_en(sample_en), .dsm_bit(dsm_bit),
    .duty(duty), .duty_at_max(at_max), .duty_at_min(at_min));

  buck_plant u_plant (
    .clk(clk), .rst_n(rst_n), .pwm(pwm), .rload_mohm(20_000),
    .vout(vout), .vout_v(vout_v), .iload_a(iload_a));

  real phase = 0.0;

  // Runs the sine at f_hz for settle_periods, then measures over
  // meas_periods; returns gain (linear) and the mean output voltage.
  task automatic measure(input real f_hz, input int settle_periods,
                         input int meas_periods, output real gain, output real mean);
    longint n_settle, n_meas;
    real si, co, acc_s, acc_c, acc_m, w;
    w        = 2.0 * PI * f_hz * TCLKS;
    n_settle = longint'(real'(settle_periods) / (f_hz * TCLKS));
    n_meas   = longint'(real'(meas_periods) / (f_hz * TCLKS));
    acc_s = 0.0; acc_c = 0.0; acc_m = 0.0;
    phase = 0.0;
    for (longint i = 0; i < n_settle + n_meas; i++) begin
      @(posedge clk);
      si = $sin(phase);
      co = $cos(phase);
      vref = volt_uv_t'($rtoi((1.5 + AMP * si) * 1.0e6));
      if (i >= n_settle) begin
        acc_s += vout_v * si;
        acc_c += vout_v * co;
        acc_m += vout_v;
      end
      phase += w;
      if (phase > 2.0 * PI) phase -= 2.0 * PI;
    end
    acc_s = 2.0 * acc_s / real'(n_meas);
    acc_c = 2.0 * acc_c / real'(n_meas);
    gain  = $sqrt(acc_s * acc_s + acc_c * acc_c) / AMP;
    mean  = acc_m / real'(n_meas);
  endtask

  initial begin
    real g, m, db;
    vref = volt_uv_t'(1_500_000);
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (128 * 1000) @(posedge clk);   // 1 ms soft start

    // Quantisation noise at the output: with a constant reference the
    // modulator's one-bit error is +/-0.75 V wide; the RMS deviation of the
    // switching-period-averaged output from its mean must stay below 20 mV (one duty LSB
    // is 12.9 mV at 3.3 V input, and the duty dithers by at least one LSB).
    begin
      real acc, acc2, pv, mu, rms;
      acc = 0.0; acc2 = 0.0;
      for (int p = 0; p < 1000; p++) begin
        pv = 0.0;
        repeat (256) begin
          @(posedge clk);
          pv += vout_v;
        end
        pv = pv / 256.0;
        acc  += pv;
        acc2 += pv * pv;
      end
      mu  = acc / 1000.0;
      rms = $sqrt(acc2 / 1000.0 - mu * mu);
      $display("constant Vref: mean %f V, period-averaged RMS deviation %f mV", mu, rms * 1.0e3);
      checks++;
      if (rms > 0.020) begin failures++; $display("FAIL output noise"); end
    end

    measure(100.0, 1, 2, g, m);
    db = 20.0 * $log10(g);
    $display("100 Hz: gain %f dB, mean %f V", db, m);
    checks++;
    if (db > 1.5 || db < -1.5) begin failures++; $display("FAIL low-frequency gain"); end
    checks++;
    if (m > 1.520 || m < 1.480) begin failures++; $display("FAIL DC level"); end

    measure(300.0, 2, 3, g, m);
    db = 20.0 * $log10(g);
    $display("300 Hz: gain %f dB", db);
    checks++;
    if (db > 1.5 || db < -3.0) begin failures++; $display("FAIL 300 Hz gain"); end

    measure(3_000.0, 10, 10, g, m);
    db = 20.0 * $log10(g);
    $display("3 kHz: gain %f dB", db);
    checks++;
    if (db > 6.0) begin failures++; $display("FAIL peaking near the loop bandwidth"); end

    measure(40_000.0, 40, 40, g, m);
    db = 20.0 * $log10(g);
    $display("40 kHz: gain %f dB", db);
    checks++;
    if (db > -15.0) begin failures++; $display("FAIL high-frequency attenuation"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
