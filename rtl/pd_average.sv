// pd_average: boxcar average over the region of interest.
//
// For every channel the averager sums the reference-subtracted phase (as a
// signed binary angle) and the magnitude of the samples for which `gate` and
// `valid` are both high. `clr` (the recorders' start pulse) clears the sums;
// a sample accepted in the clear cycle becomes the first term. When `done`
// marks the last sample of the region, the sums are divided by the sample
// count 2^avg_log2 with a shift and rounded, and the results appear on
// `avg` with a one-cycle `avg_valid` pulse two cycles after `done`. These are
// the scalar readings of the detector.
//
// The phase is averaged as a signed number, so a channel whose difference
// sits near +/-180 degrees averages wrongly; relative phases are normally far
// from that point.
// From the description: a boxcar average with a user-chosen number of
// samples over a user-chosen region, fed by the delta-phase stage. The
// power-of-two count and the rounding are this design's own.
module pd_average
  import phdet_pkg::*;
#(
  parameter int unsigned AVG_LOG2_MAX = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              gate,
  input  logic              done,
  input  logic [3:0]        avg_log2,
  input  pm_t  [NCH-1:0]    din,
  input  logic              valid,
  output pm_t  [NCH-1:0]    avg,
  output logic              avg_valid
);

  localparam int unsigned SW = PH_W + AVG_LOG2_MAX + 1;

  logic signed [SW-1:0] psum [NCH];
  logic        [SW-1:0] msum [NCH];
  logic                 done_d;
  logic [3:0]           nlog;
  logic signed [SW-1:0] rnd;

  assign nlog = (avg_log2 > 4'(AVG_LOG2_MAX)) ? 4'(AVG_LOG2_MAX) : avg_log2;
  assign rnd  = (nlog == 0) ? '0 : SW'(1) <<< (nlog - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int ch = 0; ch < NCH; ch++) begin
        psum[ch] <= '0;
        msum[ch] <= '0;
      end
      done_d    <= 1'b0;
      avg       <= '0;
      avg_valid <= 1'b0;
    end else begin
      done_d    <= done;
      avg_valid <= done_d;
      for (int ch = 0; ch < NCH; ch++) begin
        if (clr) begin
          psum[ch] <= (gate && valid) ? SW'(din[ch].phase) : '0;
          msum[ch] <= (gate && valid) ? SW'(din[ch].mag)   : '0;
        end else if (gate && valid) begin
          psum[ch] <= psum[ch] + SW'(din[ch].phase);
          msum[ch] <= msum[ch] + SW'(din[ch].mag);
        end
        if (done_d) begin
          avg[ch].phase <= phase_t'((psum[ch] + rnd) >>> nlog);
          avg[ch].mag   <= mag_t'((msum[ch] + rnd) >> nlog);
        end
      end
    end
  end

endmodule
