// integral_controller: the control law, a digital integrator that turns the
// one-bit delta-sigma stream directly into a PWM duty command.
//
// On every integrator clock (sample_en) the duty register moves by one duty LSB
// (delta-d): up when the modulator bit is 1 (Vref above Vout), down when it is 0.
// Averaged over many samples the duty therefore changes at a rate
// delta-d / T_cnt times the mean of the +/-1 bit stream, which is the integrator
// K(s) = K/s with K = delta-d / T_cnt. The register saturates at DUTY_MIN and
// DUTY_MAX; at_max/at_min flag a step that was held back by a limit.
//
// Interface: clk, rst_n (active-low asynchronous; duty resets to DUTY_INIT),
// sample_en strobe, dsm_bit, duty (registered, updated the cycle after a strobe).
//
// Integral-only control and the delta-d / T_cnt gain are the document's. The
// one-LSB-per-bit update, the saturation limits and the reset value are this
// design's choices.
module integral_controller #(
  parameter int unsigned           DUTY_BITS = dcdc_pkg::DUTY_BITS_DEF,
  parameter logic [DUTY_BITS-1:0]  DUTY_MIN  = '0,
  parameter logic [DUTY_BITS-1:0]  DUTY_MAX  = '1,
  parameter logic [DUTY_BITS-1:0]  DUTY_INIT = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_en,
  input  logic                 dsm_bit,
  output logic [DUTY_BITS-1:0] duty,
  output logic                 at_max,
  output logic                 at_min
);

  logic [DUTY_BITS-1:0] duty_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      duty_q <= DUTY_INIT;
    end else if (sample_en) begin
      if (dsm_bit && duty_q < DUTY_MAX)       duty_q <= duty_q + 1'b1;
      else if (!dsm_bit && duty_q > DUTY_MIN) duty_q <= duty_q - 1'b1;
    end
  end

  assign duty   = duty_q;
  assign at_max = sample_en &&  dsm_bit && (duty_q >= DUTY_MAX);
  assign at_min = sample_en && !dsm_bit && (duty_q <= DUTY_MIN);

  initial begin
    assert (int'(DUTY_MIN) <= int'(DUTY_INIT) && int'(DUTY_INIT) <= int'(DUTY_MAX))
      else $error("integral_controller: DUTY_INIT outside [DUTY_MIN, DUTY_MAX]");
  end

endmodule
