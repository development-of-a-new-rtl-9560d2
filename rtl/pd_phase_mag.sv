// pd_phase_mag: phase and magnitude of all eight channels.
//
// One pipelined CORDIC (pd_cordic) per channel converts the channel's (I, Q)
// pair into a 16-bit binary-angle phase (2^16 counts = 360 degrees) and a
// magnitude in ADC counts. All channels run in lockstep, so one valid flag
// serves them all; a pair may enter every 80 MHz cycle although the I/Q
// sampler delivers one every second cycle.
//
// Timing: `pm_valid` follows `iq_valid` by ITER + 2 cycles.
// From the description: a phase/magnitude stage fed by the I/Q sampling and
// clocked at 80 MHz. The CORDIC method is this design's choice.
module pd_phase_mag
  import phdet_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  iq_pair_t [NCH-1:0]  iq,
  input  logic                iq_valid,
  output pm_t      [NCH-1:0]  pm,
  output logic                pm_valid
);

  logic [NCH-1:0] v;

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    pd_cordic #(.ITER(ITER)) u_cordic (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (iq_valid),
      .in_i      (iq[ch].i),
      .in_q      (iq[ch].q),
      .out_valid (v[ch]),
      .phase     (pm[ch].phase),
      .mag       (pm[ch].mag)
    );
  end

  assign pm_valid = v[0];

endmodule
