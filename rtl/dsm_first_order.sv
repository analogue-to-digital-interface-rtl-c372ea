// dsm_first_order: behavioural model of the analogue first-order delta-sigma
// modulator (switched-capacitor circuit on the real chip). Not synthesizable:
// it keeps its integrator state as a real number.
//
// Structure: the modulator input is the difference vin_p - vin_n (the controller
// feeds Vref and Vout, so the modulator sees the regulation error). On each sample
// strobe the integrator adds the input minus the fed-back output level:
//     u[n+1] = u[n] + (vin[n] - y[n]),   y[n] = +VFS if u[n] > 0 else -VFS.
// The comparator looks at the delayed integrator state against ground, so
// dsm_out follows u[n] combinationally. This gives STF = z^-1 and NTF = 1 - z^-1.
//
// Interface: clk/rst_n (active-low asynchronous reset clears the integrator),
// sample_en (one-cycle strobe per sampling instant), vin_p/vin_n in microvolts,
// dsm_out the one-bit stream (1 = positive integrated error).
//
// The loop topology (two summers, a z^-1 and a comparator against ground) is the
// document's. The feedback level VFS_V and the integrator clamp VSAT_V, which
// stands for the limited output swing of a real switched-capacitor integrator,
// are this design's choices.
module dsm_first_order
  import dcdc_pkg::*;
#(
  parameter real VFS_V  = 0.75,  // fed-back output level, volts (+/-VFS_V)
  parameter real VSAT_V = 1.5   // integrator swing limit, volts
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sample_en,
  input  volt_uv_t vin_p,
  input  volt_uv_t vin_n,
  output logic     dsm_out
);

  real u_q;    // integrator state after the z^-1 element, volts
  real vin;    // differential input, volts
  real fb;     // fed-back comparator level, volts
  real u_d;    // next integrator state before clamping

  always_comb begin
    vin = real'(int'(vin_p) - int'(vin_n)) * 1.0e-6;
    fb  = dsm_out ? VFS_V : -VFS_V;
    u_d = u_q + vin - fb;
    if (u_d >  VSAT_V) u_d =  VSAT_V;
    if (u_d < -VSAT_V) u_d = -VSAT_V;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         u_q <= 0.0;
    else if (sample_en) u_q <= u_d;
  end

  // Comparator against ground.
  assign dsm_out = (u_q > 0.0);

endmodule
