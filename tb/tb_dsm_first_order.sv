// tb_dsm_first_order: checks the first-order delta-sigma modulator model against
// an integer reference of the same loop (microvolt units):
//     y[n] = (u[n] > 0),  u[n+1] = clamp(u[n] + vin[n] - (y[n] ? VFS : -VFS)).
// Every sample the output bit is compared with the reference (where the
// reference state is within 10 uV of zero the floating-point model may decide
// either way, and the reference follows the model's decision). For each block
// of constant input it also checks the one-bit stream's average against the
// input: |sum(vin) - sum(+/-VFS)| must stay within the integrator swing.
// Inputs include values beyond full scale to drive the integrator into its clamp.
module tb_dsm_first_order;
  import dcdc_pkg::*;

  localparam longint VFS  = 750_000;     // uV, the model's default VFS_V = 0.75
  localparam longint VSAT = 1_500_000;   // uV, the model's default VSAT_V = 1.5

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     sample_en = 1'b0;
  volt_uv_t vin_p, vin_n;
  logic     dsm_out;
  int       checks = 0, failures = 0, ambiguous = 0, clamped = 0;

  always #5ns clk = ~clk;

  dsm_first_order u_dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en),
                         .vin_p(vin_p), .vin_n(vin_n), .dsm_out(dsm_out));

  longint u_ref;

  task automatic run_block(input longint vin, input int n);
    longint sum_in, sum_fb, d;
    logic   y;
    sum_in = 0;
    sum_fb = 0;
    // Split vin into a positive and a negative terminal at random.
    vin_n = volt_uv_t'($urandom_range(0, 1_500_000));
    vin_p = volt_uv_t'(longint'(vin_n) + vin);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      y = (u_ref > 0);
      if (u_ref < 10 && u_ref > -10) begin
        ambiguous++;
        y = dsm_out;
      end else begin
        checks++;
        if (dsm_out !== y) begin
          failures++;
          $display("FAIL sample bit %0d expected %0d (u_ref=%0d vin=%0d)",
                   dsm_out, y, u_ref, vin);
        end
      end
      sum_in += vin;
      sum_fb += y ? VFS : -VFS;
      u_ref = u_ref + vin - (y ? VFS : -VFS);
      if (u_ref > VSAT)  begin u_ref = VSAT;  clamped++; end
      if (u_ref < -VSAT) begin u_ref = -VSAT; clamped++; end
      sample_en = 1'b1;
      @(negedge clk);
      sample_en = 1'b0;
      @(negedge clk);
    end
    // Average check, only where the input is within full scale.
    if (vin < VFS && vin > -VFS) begin
      d = sum_in - sum_fb;
      checks++;
      if (d > 2 * VSAT || d < -2 * VSAT) begin
        failures++;
        $display("FAIL average: vin=%0d n=%0d sum_in=%0d sum_fb=%0d", vin, n, sum_in, sum_fb);
      end
    end
  endtask

  initial begin
    vin_p = '0;
    vin_n = '0;
    u_ref = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // After reset the integrator is empty: the comparator gives 0.
    #1;
    checks++;
    if (dsm_out !== 1'b0) begin
      failures++;
      $display("FAIL reset output");
    end
    run_block(0, 64);
    run_block(250_000, 200);
    run_block(-123_457, 200);
    for (int b = 0; b < 30; b++)
      run_block(longint'($urandom_range(0, 1_499_998)) - 749_999, 150);
    // Overload beyond full scale: the integrator clamps, then recovers.
    run_block(1_200_000, 40);
    run_block(-1_000_000, 40);
    run_block(100_000, 200);
    checks++;
    if (clamped == 0) begin
      failures++;
      $display("FAIL the integrator clamp was never reached");
    end
    $display("ambiguous samples skipped: %0d, clamp events: %0d", ambiguous, clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
