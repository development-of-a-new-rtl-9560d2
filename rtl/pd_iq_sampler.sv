// pd_iq_sampler: I/Q sampling of the eight ADC channels.
//
// With the rf sampled four times per period, x = A*cos(wt + phi) gives the
// samples A*cos(phi), -A*sin(phi), -A*cos(phi), A*sin(phi). The sampler takes
// each channel's sample, negates it where the quadrature position calls for it
// and stores it as I or Q, so I = A*cos(phi) and Q = A*sin(phi) and
// atan2(Q, I) is the channel phase relative to the 20 MHz reference. A new
// (I, Q) pair is complete after every Q sample: 40 M pairs per second, each
// pair from two adjacent 80 MHz samples.
//
// Timing: ADC data and iq_phase enter an input register; one cycle later the
// I or Q register is updated, and `iq_valid` is high in the cycle the updated
// pair is on `iq`. Latency from the ADC input to the pair: 2 cycles.
// From the description: I/Q sampling of 8 channels of 14-bit data at 4x the
// rf. The sign convention and the pairing of adjacent samples are this
// design's own.
module pd_iq_sampler
  import phdet_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  adc_t      [NCH-1:0]  adc,
  input  iq_phase_e            iq_phase,
  output iq_pair_t  [NCH-1:0]  iq,
  output logic                 iq_valid
);

  adc_t [NCH-1:0] adc_r;
  iq_phase_e      ph_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_r    <= '0;
      ph_r     <= PH_I_POS;
      iq       <= '0;
      iq_valid <= 1'b0;
    end else begin
      adc_r    <= adc;
      ph_r     <= iq_phase;
      iq_valid <= (ph_r == PH_Q_NEG) || (ph_r == PH_Q_POS);
      for (int ch = 0; ch < NCH; ch++) begin
        unique case (ph_r)
          PH_I_POS: iq[ch].i <=  IQ_W'(adc_r[ch]);
          PH_Q_NEG: iq[ch].q <= -IQ_W'(adc_r[ch]);
          PH_I_NEG: iq[ch].i <= -IQ_W'(adc_r[ch]);
          PH_Q_POS: iq[ch].q <=  IQ_W'(adc_r[ch]);
        endcase
      end
    end
  end

endmodule
