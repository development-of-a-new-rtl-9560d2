// pd_rec_ctrl: recorder sample control.
//
// On an accepted trigger the controller waits `trig_delay` 80 MHz cycles and
// then issues `rec_start`, which restarts all three waveform recorders and
// clears the averager. It then counts samples of the averaged stream
// (`sample_valid`, one per I/Q pair) and holds `roi_gate` high for exactly
// 2^avg_log2 samples starting at sample number `roi_start`: the region of
// interest, normally the flat top of the rf pulse. `roi_done` pulses together
// with the last sample of the region.
//
// A trigger that arrives while the controller is busy (delay or region still
// running) is ignored and reported by `trig_ignored`.
//
// Timing: with trig_delay = D, rec_start is high D + 1 cycles after the
// trigger cycle. roi_gate is valid in the cycles where sample_valid is high.
// From the description: a control block after the trigger that starts the
// recorders, and user selection of the region of interest and of the number
// of averaged samples. The delay, the power-of-two sample count and the
// busy rule are this design's own.
module pd_rec_ctrl #(
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned AVG_LOG2_MAX = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,
  input  logic [CNT_W-1:0] trig_delay,
  input  logic [CNT_W-1:0] roi_start,
  input  logic [3:0]       avg_log2,
  input  logic             sample_valid,
  output logic             rec_start,
  output logic             roi_gate,
  output logic             roi_done,
  output logic             busy,
  output logic             trig_ignored
);

  typedef enum logic [1:0] {ST_IDLE, ST_DELAY, ST_PRE, ST_ROI} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [3:0]       nlog;
  logic [CNT_W-1:0] roi_len;

  assign nlog    = (avg_log2 > 4'(AVG_LOG2_MAX)) ? 4'(AVG_LOG2_MAX) : avg_log2;
  assign roi_len = CNT_W'(1) << nlog;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      cnt       <= '0;
      rec_start <= 1'b0;
      roi_done  <= 1'b0;
    end else begin
      rec_start <= 1'b0;
      roi_done  <= 1'b0;
      unique case (state)
        ST_IDLE:
          if (trig) begin
            if (trig_delay == '0) begin
              rec_start <= 1'b1;
              cnt       <= '0;
              state     <= (roi_start == '0) ? ST_ROI : ST_PRE;
            end else begin
              cnt   <= trig_delay - 1'b1;
              state <= ST_DELAY;
            end
          end
        ST_DELAY:
          if (cnt == '0) begin
            rec_start <= 1'b1;
            state     <= (roi_start == '0) ? ST_ROI : ST_PRE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        ST_PRE:
          if (sample_valid) begin
            if (cnt + 1'b1 == roi_start) begin
              cnt   <= '0;
              state <= ST_ROI;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        ST_ROI:
          if (sample_valid) begin
            if (cnt + 1'b1 == roi_len) begin
              cnt      <= '0;
              roi_done <= 1'b1;
              state    <= ST_IDLE;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
      endcase
    end
  end

  assign roi_gate     = (state == ST_ROI);
  assign busy         = (state != ST_IDLE);
  assign trig_ignored = trig && busy;

endmodule
