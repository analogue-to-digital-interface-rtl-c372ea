// tb_dsm_dcdc_controller: closed-loop test of the whole controller at its
// default parameters, driving a behavioural buck converter (buck_plant).
//
// Sequence: soft start to Vref = 1.5 V at a 75 mA load; a load step to 275 mA
// and back; a reference step to 2.0 V and back; finally a reference above the
// input voltage, which drives the duty command into its upper limit, and back.
// Checks:
//   - regulation: the output voltage averaged over 100 us is within 20 mV of
//     Vref before every step;
//   - recovery: after each load or reference step the output voltage,
//     averaged over one switching period, is back within 40 mV of Vref no
//     later than 300 us after the step;
//   - the switching period is 256 clocks (500 kHz at 128 MHz) and one
//     modulator sample and one duty step happen per period;
//   - every duty change is one LSB, upward after a 1 and downward after a 0;
//   - each mechanism happens at least once: modulator 1s and 0s, duty up and
//     down steps, integrator held at its lower and upper limit, modulator
//     integrator clamp (overload), load steps and reference steps.
module tb_dsm_dcdc_controller;
  import dcdc_pkg::*;

  localparam realtime TCLK = 7.8125ns;   // 128 MHz

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  volt_uv_t   vref, vout;
  logic       pwm, period_start, sample_en, dsm_bit, at_max, at_min;
  logic [7:0] duty;
  int         rload_mohm;
  real        vout_v, iload_a;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_ones = 0, n_zeros = 0, n_up = 0, n_down = 0, n_at_max = 0, n_at_min = 0;
  int n_dsm_clamp = 0, n_load_steps = 0, n_ref_steps = 0;
  longint cycle = 0;

  always #(TCLK / 2) clk = ~clk;

  dsm_dcdc_controller u_dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .vref         (vref),
    .vout         (vout),
    .pwm          (pwm),
    .period_start (period_start),
    .sample_en    (sample_en),
    .dsm_bit      (dsm_bit),
    .duty         (duty),
    .duty_at_max  (at_max),
    .duty_at_min  (at_min)
  );

  buck_plant u_plant (
    .clk        (clk),
    .rst_n      (rst_n),
    .pwm        (pwm),
    .rload_mohm (rload_mohm),
    .vout       (vout),
    .vout_v     (vout_v),
    .iload_a    (iload_a)
  );

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // ---------------------------------------------------------------------
  // Cycle-level monitors.
  // ---------------------------------------------------------------------
  longint last_ps = -1, last_se = -1;
  logic [7:0] duty_prev = 8'h00;
  logic       pending = 1'b0, pending_bit;

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (period_start) begin
        if (last_ps >= 0) begin
          checks++;
          if (cycle - last_ps != 256) fail($sformatf("switching period %0d clocks", cycle - last_ps));
        end
        last_ps = cycle;
      end
      if (sample_en) begin
        if (last_se >= 0) begin
          checks++;
          if (cycle - last_se != 256) fail($sformatf("sample period %0d clocks", cycle - last_se));
        end
        last_se = cycle;
        if (dsm_bit) n_ones++; else n_zeros++;
        if (at_max) n_at_max++;
        if (at_min) n_at_min++;
      end
      if (u_dut.u_dsm.u_q >= u_dut.DSM_VSAT_V || u_dut.u_dsm.u_q <= -u_dut.DSM_VSAT_V)
        if (sample_en) n_dsm_clamp++;
      // Duty must move only on the cycle after a sample, by one LSB,
      // in the direction of the modulator bit, unless held at a limit.
      if (pending) begin
        checks++;
        if (pending_bit && duty_prev != 8'hFF) begin
          if (duty != duty_prev + 8'd1) fail("duty did not step up");
          else n_up++;
        end else if (!pending_bit && duty_prev != 8'h00) begin
          if (duty != duty_prev - 8'd1) fail("duty did not step down");
          else n_down++;
        end else if (duty != duty_prev) fail("duty moved while at a limit");
      end else if (duty != duty_prev) begin
        checks++;
        fail("duty moved without a sample");
      end
      pending     <= sample_en;
      pending_bit <= dsm_bit;
      duty_prev   <= duty;
    end
  end

  // ---------------------------------------------------------------------
  // Helpers working on the plant's output voltage.
  // ---------------------------------------------------------------------
  task automatic wait_us(input real us);
    repeat ($rtoi(us * 128.0)) @(posedge clk);
  endtask

  // Average of vout over the given number of whole switching periods.
  task automatic avg_vout(input int periods, output real avg);
    real acc;
    acc = 0.0;
    repeat (periods * 256) begin
      @(posedge clk);
      acc += vout_v;
    end
    avg = acc / real'(periods * 256);
  endtask

  task automatic check_regulation(input string what);
    real avg, target;
    target = real'(vref) * 1.0e-6;
    avg_vout(50, avg);
    checks++;
    if (avg > target + 0.020 || avg < target - 0.020)
      fail($sformatf("%s: regulation %f V, Vref %f V", what, avg, target));
    else
      $display("%s: average %f V (Vref %f V)", what, avg, target);
  endtask

  // After a step: time until the period-averaged output stays within
  // 40 mV of Vref for 20 consecutive periods; must be within 300 us.
  task automatic check_recovery(input string what);
    real avg, target;
    int  good, periods, settle;
    target  = real'(vref) * 1.0e-6;
    good    = 0;
    settle  = -1;
    periods = 0;
    while (periods < 400 && good < 20) begin
      avg_vout(1, avg);
      periods++;
      if (avg < target + 0.040 && avg > target - 0.040) good++;
      else good = 0;
    end
    if (good >= 20) settle = (periods - 20) * 2;   // microseconds
    checks++;
    if (settle < 0 || settle > 300)
      fail($sformatf("%s: not settled within 300 us (settle %0d us)", what, settle));
    else
      $display("%s: settled in %0d us", what, settle);
  endtask

  initial begin
    vref       = volt_uv_t'(1_500_000);
    rload_mohm = 20_000;                 // 1.5 V / 75 mA
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;

    // Soft start.
    wait_us(1200);
    check_regulation("start-up at 75 mA");

    // Load step 75 mA -> 275 mA -> 75 mA.
    rload_mohm = 5_455;                  // 1.5 V / 275 mA
    n_load_steps++;
    check_recovery("load step up");
    wait_us(200);
    check_regulation("steady at 275 mA");
    rload_mohm = 20_000;
    n_load_steps++;
    check_recovery("load step down");
    wait_us(200);
    check_regulation("steady at 75 mA");

    // Reference step 1.5 V -> 2.0 V -> 1.5 V.
    vref = volt_uv_t'(2_000_000);
    n_ref_steps++;
    check_recovery("Vref step up");
    wait_us(300);
    check_regulation("steady at 2.0 V");
    vref = volt_uv_t'(1_500_000);
    n_ref_steps++;
    check_recovery("Vref step down");
    wait_us(300);
    check_regulation("steady at 1.5 V");

    // Reference above the input voltage: the duty command saturates.
    vref = volt_uv_t'(3_600_000);
    wait_us(700);
    vref = volt_uv_t'(1_500_000);
    wait_us(1200);
    check_regulation("after saturation");

    $display("mechanisms: ones=%0d zeros=%0d up=%0d down=%0d at_max=%0d at_min=%0d dsm_clamp=%0d load_steps=%0d ref_steps=%0d",
             n_ones, n_zeros, n_up, n_down, n_at_max, n_at_min, n_dsm_clamp, n_load_steps, n_ref_steps);
    checks++; if (n_ones == 0)       fail("no modulator 1");
    checks++; if (n_zeros == 0)      fail("no modulator 0");
    checks++; if (n_up == 0)         fail("no duty up-step");
    checks++; if (n_down == 0)       fail("no duty down-step");
    checks++; if (n_at_max == 0)     fail("duty never held at its upper limit");
    checks++; if (n_at_min == 0)     fail("duty never held at its lower limit");
    checks++; if (n_dsm_clamp == 0)  fail("modulator integrator never clamped");
    checks++; if (n_load_steps != 2) fail("load steps not applied");
    checks++; if (n_ref_steps != 2)  fail("reference steps not applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
