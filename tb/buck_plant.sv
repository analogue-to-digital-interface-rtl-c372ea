// buck_plant: behavioural model of the power output stage and output filter of
// a synchronous buck converter, for simulation only.
//
// Each clock (TCLK_S seconds) it advances the inductor current and capacitor
// voltage by one forward-Euler step. The switch node is VIN_V while pwm is high
// and 0 V while it is low; the inductor has series resistance RL_OHM, the
// capacitor series resistance ESR_OHM, and the load is a resistor of
// rload_mohm milliohms. vout is the output voltage in microvolts.
//
// All element values are this model's assumptions: L = 4.7 uH, C = 22 uF,
// 3.3 V input, 50 mohm capacitor ESR, which put the LC resonance near 15.6 kHz.
module buck_plant
  import dcdc_pkg::*;
#(
  parameter real VIN_V   = 3.3,
  parameter real L_H     = 4.7e-6,
  parameter real C_F     = 22.0e-6,
  parameter real RL_OHM  = 0.05,
  parameter real ESR_OHM = 0.05,
  parameter real TCLK_S  = 1.0 / 128.0e6
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     pwm,
  input  int       rload_mohm,
  output volt_uv_t vout,
  output real      vout_v,
  output real      iload_a
);

  real il, vc;
  real rload, vsw, iout, vo;

  always_comb begin
    rload = real'(rload_mohm) * 1.0e-3;
    vsw   = pwm ? VIN_V : 0.0;
    // Output node: vo = vc + ESR*(il - vo/rload)  =>  solve for vo.
    vo    = (vc + ESR_OHM * il) / (1.0 + ESR_OHM / rload);
    iout  = vo / rload;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      il <= 0.0;
      vc <= 0.0;
    end else begin
      il <= il + (vsw - il * RL_OHM - vo) / L_H * TCLK_S;
      vc <= vc + (il - iout) / C_F * TCLK_S;
    end
  end

  assign vout    = volt_uv_t'($rtoi(vo * 1.0e6));
  assign vout_v  = vo;
  assign iload_a = iout;

endmodule
