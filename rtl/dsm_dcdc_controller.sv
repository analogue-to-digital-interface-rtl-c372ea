// dsm_dcdc_controller: digital controller for a buck DC-DC converter with a
// one-bit delta-sigma analogue-to-digital interface in place of a flash ADC.
//
// Signal path: the first-order delta-sigma modulator samples the error
// vref - vout on every integrator clock and produces one bit; the integral
// control law moves the duty command one LSB up or down per bit; the digital
// PWM turns the duty command into the gate drive pwm for the power output stage
// at 500 kHz. The inductor, capacitor and load outside the chip close the loop.
//
// Interface: clk (128 MHz by default), rst_n (active-low asynchronous),
// vref and vout in microvolts (analogue inputs of the modulator), pwm (gate
// drive), and for observation dsm_bit, sample_en, duty, period_start and the
// integrator limit flags.
//
// Timing: one modulator sample and one duty step every SAMPLE_DIV clocks
// (T_cnt = 2 us, one switching period); the duty command reaches pwm at the next switching period.
//
// The partition (modulator, integral control law, PWM duty control) follows the
// document. Default sizes other than the 500 kHz switching frequency are this
// design's choices.
module dsm_dcdc_controller
  import dcdc_pkg::*;
#(
  parameter int unsigned DUTY_BITS  = DUTY_BITS_DEF,
  parameter int unsigned SAMPLE_DIV = SAMPLE_DIV_DEF,
  parameter real         DSM_VFS_V  = 0.75,
  parameter real         DSM_VSAT_V = 1.5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  volt_uv_t             vref,
  input  volt_uv_t             vout,
  output logic                 pwm,
  output logic                 period_start,
  output logic                 sample_en,
  output logic                 dsm_bit,
  output logic [DUTY_BITS-1:0] duty,
  output logic                 duty_at_max,
  output logic                 duty_at_min
);

  tick_gen #(
    .DIV (SAMPLE_DIV)
  ) u_tick (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (sample_en)
  );

  dsm_first_order #(
    .VFS_V  (DSM_VFS_V),
    .VSAT_V (DSM_VSAT_V)
  ) u_dsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .sample_en (sample_en),
    .vin_p     (vref),
    .vin_n     (vout),
    .dsm_out   (dsm_bit)
  );

  integral_controller #(
    .DUTY_BITS (DUTY_BITS)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .sample_en (sample_en),
    .dsm_bit   (dsm_bit),
    .duty      (duty),
    .at_max    (duty_at_max),
    .at_min    (duty_at_min)
  );

  dpwm #(
    .DUTY_BITS (DUTY_BITS)
  ) u_dpwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .duty         (duty),
    .pwm          (pwm),
    .period_start (period_start)
  );

endmodule
