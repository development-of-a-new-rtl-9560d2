// pd_delta_phase: phase of each channel relative to its bank reference.
//
// The eight channels form two banks of four; the first channel of each bank
// (channel 0 and channel 4) carries that bank's reference signal. The
// reference phase is subtracted from the phase of the three other channels of
// the bank, which removes the common phase drift of the reference and the
// sampling clock. Binary-angle arithmetic wraps modulo 360 degrees, so the
// difference is always in [-180, 180). Magnitudes pass unchanged.
// The reference channels themselves keep their absolute phase in their slot,
// so that the recorders and the average still show it.
//
// Timing: registered; `dpm_valid` follows `pm_valid` by one cycle.
// From the description: two banks, references on channels 0 and 4, reference
// subtracted from the three associated inputs. Keeping the absolute phase in
// the reference slots is this design's choice.
module pd_delta_phase
  import phdet_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  pm_t  [NCH-1:0]     pm,
  input  logic               pm_valid,
  output pm_t  [NCH-1:0]     dpm,
  output logic               dpm_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dpm       <= '0;
      dpm_valid <= 1'b0;
    end else begin
      dpm_valid <= pm_valid;
      for (int unsigned ch = 0; ch < NCH; ch++) begin
        dpm[ch].mag <= pm[ch].mag;
        if (ch == ref_chan(ch)) dpm[ch].phase <= pm[ch].phase;
        else                    dpm[ch].phase <= pm[ch].phase - pm[ref_chan(ch)].phase;
      end
    end
  end

endmodule
