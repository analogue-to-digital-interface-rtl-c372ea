// dpwm: PWM duty control, a counter-comparator digital pulse-width modulator.
//
// A DUTY_BITS-bit counter runs freely, one switching period every 2**DUTY_BITS
// clocks. pwm is high while the counter is below the latched duty, so the duty
// ratio is duty / 2**DUTY_BITS and its resolution delta-d is 1 / 2**DUTY_BITS.
// The duty input is latched at the start of each period (period_start), so a
// change mid-period never produces a runt pulse.
//
// Interface: clk, rst_n (active-low asynchronous), duty, pwm (registered),
// period_start (one-cycle strobe, the cycle the counter is 0 and the new duty
// takes effect). pwm is delayed by one clock from the counter compare.
//
// The document gives only the function (a PWM generator with duty resolution
// delta-d at a 500 kHz switching frequency); the counter-comparator structure,
// 8-bit resolution (128 MHz clock) and period-start latching are this design's
// choices.
module dpwm #(
  parameter int unsigned DUTY_BITS = dcdc_pkg::DUTY_BITS_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DUTY_BITS-1:0] duty,
  output logic                 pwm,
  output logic                 period_start
);

  logic [DUTY_BITS-1:0] cnt_q;
  logic [DUTY_BITS-1:0] duty_q;
  logic [DUTY_BITS-1:0] duty_now;

  assign period_start = (cnt_q == '0);
  assign duty_now     = period_start ? duty : duty_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      duty_q <= '0;
      pwm    <= 1'b0;
    end else begin
      cnt_q  <= cnt_q + 1'b1;
      duty_q <= duty_now;
      pwm    <= (cnt_q < duty_now);
    end
  end

endmodule
