// tb_tick_gen: checks that the integrator clock strobe is one cycle wide and
// arrives exactly every DIV cycles, first DIV cycles after reset, for the
// default divider (256) and a small one (5).
module tb_tick_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick_a, tick_b;
  int   checks = 0, failures = 0;

  always #5ns clk = ~clk;

  tick_gen              u_a (.clk(clk), .rst_n(rst_n), .tick(tick_a));
  tick_gen #(.DIV(5))   u_b (.clk(clk), .rst_n(rst_n), .tick(tick_b));

  task automatic check_period(input int div, input int n, ref logic t);
    int since;
    since = 0;
    for (int k = 0; k < n; k++) begin
      do begin
        @(posedge clk);
        since++;
      end while (!t);
      checks++;
      if (since != div) begin
        failures++;
        $display("FAIL DIV=%0d strobe %0d after %0d cycles", div, k, since);
      end
      since = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      check_period(256, 10, tick_a);
      check_period(5, 50, tick_b);
    join
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
