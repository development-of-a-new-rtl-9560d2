// pd_adc_model: behavioural model (not synthesizable) of eight 14-bit ADCs
// sampling 20 MHz rf. At each rising edge of `clk` channel ch converts
// amp[ch] * cos(2*pi*20 MHz*t + phase[ch]) plus uniform noise of +/-NOISE
// counts, with t the simulation time, and presents the two's complement
// code until the next edge. While `rf_on` is low the inputs carry only noise
// (the rf pulse is off). Phases are given in millidegrees.
module pd_adc_model
  import phdet_pkg::*;
#(
  parameter int NOISE = 2
) (
  input  logic             clk,
  input  logic             rf_on,
  input  int               amp       [NCH],
  input  int               phase_mdeg[NCH],
  output adc_t [NCH-1:0]   adc
);

  localparam real PI = 3.14159265358979;

  initial adc = '0;

  always @(posedge clk) begin
    real t, v;
    t = $realtime / 1.0ns;
    for (int ch = 0; ch < NCH; ch++) begin
      v = rf_on ? real'(amp[ch]) * $cos(2.0 * PI * 20.0e-3 * t + real'(phase_mdeg[ch]) / 1000.0 * PI / 180.0) : 0.0;
      v += real'($urandom_range(2 * NOISE)) - real'(NOISE);
      if (v > 8191.0) v = 8191.0;
      if (v < -8192.0) v = -8192.0;
      adc[ch] <= adc_t'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
    end
  end

endmodule
