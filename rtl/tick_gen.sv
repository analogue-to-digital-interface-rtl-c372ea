// tick_gen: integrator clock generator. Divides the system clock by DIV and
// emits a one-cycle strobe, tick, on the last cycle of every DIV-cycle period.
// The strobe is the sampling clock of the delta-sigma modulator and the update
// clock of the digital integrator; its period is the T_cnt of the integrator
// gain K = delta-d / T_cnt.
//
// Interface: clk, rst_n (active-low asynchronous), tick. First tick DIV cycles
// after reset is released, then every DIV cycles.
//
// The document names T_cnt but gives no value; DIV = 256 (2 us at 128 MHz, one
// switching period) and running the modulator at the same rate are this
// design's choices.
module tick_gen #(
  parameter int unsigned DIV = dcdc_pkg::SAMPLE_DIV_DEF
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         cnt_q <= '0;
    else if (cnt_q == CW'(DIV - 1))     cnt_q <= '0;
    else                                cnt_q <= cnt_q + 1'b1;
  end

  assign tick = (cnt_q == CW'(DIV - 1));

  initial begin
    assert (DIV >= 2) else $error("tick_gen: DIV must be at least 2");
  end

endmodule
