// tb_integral_controller: drives random modulator bits and random sample
// strobes into two integrators (default 8-bit 0..255 from 0, and a 4-bit one
// limited to 2..13 starting at 5) and compares the duty register and the limit
// flags every cycle with a reference up/down counter.
module tb_integral_controller;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_en, dsm_bit;
  logic [7:0] duty_a;
  logic [3:0] duty_b;
  logic amax_a, amin_a, amax_b, amin_b;
  int   ref_a, ref_b;
  int   checks = 0, failures = 0;
  int   n_max = 0, n_min = 0;

  always #5ns clk = ~clk;

  integral_controller u_a (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .dsm_bit(dsm_bit),
    .duty(duty_a), .at_max(amax_a), .at_min(amin_a));

  integral_controller #(.DUTY_BITS(4), .DUTY_MIN(4'd2), .DUTY_MAX(4'd13),
                        .DUTY_INIT(4'd5)) u_b (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .dsm_bit(dsm_bit),
    .duty(duty_b), .at_max(amax_b), .at_min(amin_b));

  function automatic int step(int cur, bit up, int lo, int hi);
    if (up && cur < hi)  return cur + 1;
    if (!up && cur > lo) return cur - 1;
    return cur;
  endfunction

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int bias;
    sample_en = 1'b0;
    dsm_bit   = 1'b0;
    ref_a = 0;
    ref_b = 5;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cmp("reset duty_a", int'(duty_a), 0);
    cmp("reset duty_b", int'(duty_b), 5);
    // Phases with a bias toward up or down so both limits are reached.
    for (int ph = 0; ph < 6; ph++) begin
      bias = (ph % 2 == 0) ? 85 : 15;
      for (int i = 0; i < 700; i++) begin
        @(negedge clk);
        sample_en = ($urandom_range(0, 2) != 0);
        dsm_bit   = ($urandom_range(0, 99) < bias);
        #1;
        cmp("at_max_a", int'(amax_a), int'(sample_en && dsm_bit && ref_a == 255));
        cmp("at_min_a", int'(amin_a), int'(sample_en && !dsm_bit && ref_a == 0));
        cmp("at_max_b", int'(amax_b), int'(sample_en && dsm_bit && ref_b == 13));
        cmp("at_min_b", int'(amin_b), int'(sample_en && !dsm_bit && ref_b == 2));
        if (amax_a) n_max++;
        if (amin_a) n_min++;
        if (sample_en) begin
          ref_a = step(ref_a, dsm_bit, 0, 255);
          ref_b = step(ref_b, dsm_bit, 2, 13);
        end
        @(posedge clk);
        #1;
        cmp("duty_a", int'(duty_a), ref_a);
        cmp("duty_b", int'(duty_b), ref_b);
      end
    end
    checks++;
    if (n_max == 0 || n_min == 0) begin
      failures++;
      $display("FAIL limits not both reached: max %0d min %0d", n_max, n_min);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
