// pd_pm_mux: source select for the phase & magnitude waveform recorder.
//
// The recorder can show either the absolute phase and magnitude of every
// channel (sel = 0) or the reference-subtracted phase with the magnitudes
// (sel = 1). The selected stream and its valid flag are registered, so the
// output is one cycle behind the chosen input.
// From the description: a multiplexer between the phase/magnitude and the
// delta-phase outputs feeding that recorder. The select encoding is this
// design's own.
module pd_pm_mux
  import phdet_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sel,
  input  pm_t  [NCH-1:0]     pm,
  input  logic               pm_valid,
  input  pm_t  [NCH-1:0]     dpm,
  input  logic               dpm_valid,
  output pm_t  [NCH-1:0]     out,
  output logic               out_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else if (sel) begin
      out       <= dpm;
      out_valid <= dpm_valid;
    end else begin
      out       <= pm;
      out_valid <= pm_valid;
    end
  end

endmodule
