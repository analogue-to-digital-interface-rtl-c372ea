// tb_dpwm: for a sequence of duty values (including 0 and full scale) it counts
// the high cycles of pwm in each 256-clock switching period and checks them
// against the duty latched at that period's start. The duty input is also
// changed in the middle of periods to check that it only takes effect at the
// next period start. The period length is checked from period_start.
module tb_dpwm;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] duty;
  logic       pwm, period_start;
  int         checks = 0, failures = 0;

  always #5ns clk = ~clk;

  dpwm u_dut (.clk(clk), .rst_n(rst_n), .duty(duty), .pwm(pwm),
              .period_start(period_start));

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int expected, highs, len;
    duty = 8'd0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Align to a period start, sampling at falling edges where all is settled.
    @(negedge clk);
    while (!period_start) @(negedge clk);
    for (int p = 0; p < 40; p++) begin
      case (p)
        0:       expected = 0;
        1:       expected = 255;
        2:       expected = 1;
        3:       expected = 128;
        default: expected = $urandom_range(0, 255);
      endcase
      // Counter is 0: this duty is latched for the coming period.
      duty  = 8'(expected);
      highs = 0;
      // pwm lags the counter by one clock, so the 256 samples that follow
      // cover counter values 0..255.
      for (len = 0; len < 256; len++) begin
        @(negedge clk);
        if (pwm) highs++;
        // Disturb the duty input mid-period.
        if (len == 100) duty = 8'($urandom_range(0, 255));
      end
      cmp("high cycles", highs, expected);
      cmp("period start", int'(period_start), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
