// pd_iq_sample_ctrl: I/Q sample control.
//
// The ADCs are clocked at 80 MHz, four times the 20 MHz down-converted rf, so
// consecutive samples sit 90 degrees apart on the rf waveform. This block tells
// the I/Q sampler which of the four quadrature positions (I, -Q, -I, Q) the
// current sample belongs to. It samples the PLL's 20 MHz output (the copy
// shifted by -30 degrees, so its edges stay clear of the 80 MHz edge) in the
// 80 MHz domain, detects its rising edge and re-aligns a free-running 2-bit
// phase counter to it. A programmable offset moves the I sample to any of the
// four positions, which absorbs ADC and board latency.
//
// Lock: an edge is expected whenever the counter is about to return to the
// offset. After LOCK_EDGES consecutive edges exactly where expected, `locked`
// rises; a missing or misplaced edge clears it and the counter realigns.
//
// Timing: `iq_phase` is registered; the rising edge of ref20 seen at the 80 MHz
// input register sets iq_phase = offset two clock cycles later.
// From the description: the 20 MHz / 80 MHz relation, the -30 degree copy
// feeding this block. The edge detector, offset and lock logic are this
// design's own.
module pd_iq_sample_ctrl
  import phdet_pkg::*;
#(
  parameter int unsigned LOCK_EDGES = 8
) (
  input  logic      clk,        // 80 MHz
  input  logic      rst_n,
  input  logic      ref20,      // 20 MHz, -30 degrees, from the PLL
  input  logic [1:0] phase_ofs, // quadrature position given to the sample at the edge
  output iq_phase_e iq_phase,
  output logic      locked
);

  localparam int unsigned LCW = $clog2(LOCK_EDGES + 1);

  logic           ref_q, ref_q2;
  logic           rise, expected;
  logic [LCW-1:0] good_cnt;
  logic [1:0]     ph;

  assign rise     = ref_q & ~ref_q2;
  assign expected = (ph + 2'd1) == phase_ofs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q    <= 1'b0;
      ref_q2   <= 1'b0;
      ph       <= 2'd0;
      good_cnt <= '0;
      locked   <= 1'b0;
    end else begin
      ref_q  <= ref20;
      ref_q2 <= ref_q;
      ph     <= rise ? phase_ofs : ph + 2'd1;
      if (rise != expected) begin
        good_cnt <= '0;
        locked   <= 1'b0;
      end else if (rise) begin
        if (good_cnt == LCW'(LOCK_EDGES - 1)) locked <= 1'b1;
        else good_cnt <= good_cnt + 1'b1;
      end
    end
  end

  assign iq_phase = iq_phase_e'(ph);

endmodule
