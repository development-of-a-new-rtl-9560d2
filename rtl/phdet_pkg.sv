// phdet_pkg: shared types and constants of the linac rf phase detector.
//
// The detector samples eight rf channels (two banks of four) with 14-bit ADCs
// at 80 MHz, four times the 20 MHz down-converted rf. Channel counts, ADC width,
// the 80 MHz / 20 MHz ratio and the reference channels (0 and 4) follow the
// design description. All other widths are choices of this implementation:
//   * I and Q are 16-bit signed (a negated 14-bit sample needs 15 bits);
//   * phase is a 16-bit binary angle, 2^16 counts = 360 degrees, so that
//     wrap-around at +/-180 degrees is free in two's complement;
//   * magnitude is 16-bit unsigned, in ADC counts after CORDIC gain removal.
package phdet_pkg;

  localparam int unsigned NCH      = 8;   // ADC channels
  localparam int unsigned BANK_CH  = 4;   // channels per bank, first is the reference
  localparam int unsigned ADC_W    = 14;  // ADC sample width
  localparam int unsigned IQ_W     = 16;  // I and Q width
  localparam int unsigned PH_W     = 16;  // binary-angle phase width
  localparam int unsigned MAG_W    = 16;  // magnitude width

  typedef logic signed [ADC_W-1:0] adc_t;
  typedef logic signed [IQ_W-1:0]  iq_t;
  typedef logic signed [PH_W-1:0]  phase_t;
  typedef logic        [MAG_W-1:0] mag_t;

  typedef struct packed {
    iq_t i;
    iq_t q;
  } iq_pair_t;

  typedef struct packed {
    phase_t phase;
    mag_t   mag;
  } pm_t;

  // Sample phase within one rf period. With x = A*cos(wt + phi) sampled at
  // wt = 0, 90, 180, 270 degrees: I = x0 = -x2, Q = -x1 = x3.
  typedef enum logic [1:0] {
    PH_I_POS = 2'd0,
    PH_Q_NEG = 2'd1,
    PH_I_NEG = 2'd2,
    PH_Q_POS = 2'd3
  } iq_phase_e;

  // Reference channel of the bank that a channel belongs to.
  function automatic int unsigned ref_chan(input int unsigned ch);
    return (ch / BANK_CH) * BANK_CH;
  endfunction

endpackage
