// dcdc_pkg: types and default sizes shared by the delta-sigma DC-DC controller.
//
// Analogue quantities that cross a module boundary (the reference voltage, the
// converter output voltage) are carried as signed integers in microvolts, so that
// the analogue models and the digital logic share plain, two-state ports.
// The switching frequency (500 kHz) follows the document; the duty resolution,
// the system clock and the integrator clock divider are this design's choices.
package dcdc_pkg;

  // Voltage in microvolts, signed: +/-8.38 V full range.
  typedef logic signed [23:0] volt_uv_t;

  // Digital PWM resolution: duty step (delta-d) = 1 / 2**DUTY_BITS.
  localparam int unsigned DUTY_BITS_DEF  = 8;

  // The switching frequency f_sw = 500 kHz follows from a system clock of
  // 2**DUTY_BITS * f_sw = 256 * 500 kHz = 128 MHz.

  // Integrator / modulator sampling clock T_cnt, in system clocks:
  // 256 clocks = 2 us = one switching period (fs = 500 kHz).
  localparam int unsigned SAMPLE_DIV_DEF = 256;

endpackage
