// phdet_top: FPGA logic of the eight-channel digital I/Q rf phase detector.
//
// Eight rf channels, in two banks of four, are sampled by 14-bit ADCs at
// 80 MHz, four times the 20 MHz down-converted rf. The chain inside:
//   ADC data -> I/Q sampling -> phase & magnitude (CORDIC) -> delta phase
// The I/Q sample control aligns the quadrature sequence to the PLL's 20 MHz
// output. Delta phase subtracts each bank's reference channel (0 and 4) from
// the three other channels of the bank. A trigger, taken from the external
// trigger input or from a selected code on the event link (each synchronized
// to 80 MHz, enabled, ORed), starts the recorder sample control: it starts
// three waveform recorders (raw ADC, I/Q, and phase & magnitude with a choice
// of absolute or delta phase) and gates a region of interest over which a
// boxcar average gives each channel's phase and magnitude. The control
// system reads everything through the register bus of pd_host_regs.
//
// Clocks: `clk` is the PLL's 80 MHz output, which also clocks the ADCs;
// `ref20` is the PLL's 20 MHz output, shifted by -30 degrees, used as data.
// `evt_clk` is the recovered event clock; only the event receiver runs on it.
// The PLL, the ADCs and the event link's transceiver are outside this module.
//
// Latencies at 80 MHz (ITER = 16): ADC pin to I/Q pair 2 cycles, I/Q to
// phase/magnitude 18, delta phase 1, recorder source mux 1. The recorders all
// start on the same cycle, so each holds its stream shifted by that stream's
// latency.
module phdet_top
  import phdet_pkg::*;
#(
  parameter int unsigned DEPTH        = 512,
  parameter int unsigned ITER         = 16,
  parameter int unsigned AVG_LOG2_MAX = 10,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ref20,
  input  adc_t  [NCH-1:0]     adc_data,
  input  logic                ext_trig,
  input  logic                evt_clk,
  input  logic                evt_rst_n,
  input  logic [7:0]          evt_code,
  input  logic                evt_valid,
  input  logic [15:0]         host_addr,
  input  logic                host_wr,
  input  logic                host_rd,
  input  logic [31:0]         host_wdata,
  output logic [31:0]         host_rdata,
  output logic                host_rvalid
);

  // control registers
  logic        en_ext, en_evt, pm_sel;
  logic [1:0]  iq_ofs;
  logic [7:0]  match_code;
  logic [15:0] trig_delay, roi_start;
  logic [3:0]  avg_log2;

  // datapath
  iq_phase_e            iq_phase;
  logic                 iq_locked;
  iq_pair_t [NCH-1:0]   iq;
  logic                 iq_valid;
  pm_t      [NCH-1:0]   pm, dpm, pmr, avg;
  logic                 pm_valid, dpm_valid, pmr_valid, avg_valid;

  // triggering
  logic evt_trig;
  logic ext_pulse, evt_pulse, trig;
  logic rec_start, roi_gate, roi_done, busy, trig_ignored;

  // recorders
  logic [AW-1:0]        rec_addr;
  adc_t     [NCH-1:0]   adc_rd;
  iq_pair_t [NCH-1:0]   iq_rd;
  pm_t      [NCH-1:0]   pm_rd;
  logic [2:0]           rec_done, rec_active;

  pd_iq_sample_ctrl u_iq_ctrl (
    .clk, .rst_n, .ref20, .phase_ofs(iq_ofs), .iq_phase, .locked(iq_locked)
  );

  pd_iq_sampler u_iq_samp (
    .clk, .rst_n, .adc(adc_data), .iq_phase, .iq, .iq_valid
  );

  pd_phase_mag #(.ITER(ITER)) u_phase_mag (
    .clk, .rst_n, .iq, .iq_valid, .pm, .pm_valid
  );

  pd_delta_phase u_delta (
    .clk, .rst_n, .pm, .pm_valid, .dpm, .dpm_valid
  );

  pd_pm_mux u_mux (
    .clk, .rst_n, .sel(pm_sel), .pm, .pm_valid, .dpm, .dpm_valid,
    .out(pmr), .out_valid(pmr_valid)
  );

  pd_event_rx u_evr (
    .evt_clk, .evt_rst_n, .evt_code, .evt_valid, .match_code,
    .evt_trig
  );

  pd_sync u_sync_ext (
    .clk, .rst_n, .async_in(ext_trig), .pulse(ext_pulse)
  );

  pd_sync u_sync_evt (
    .clk, .rst_n, .async_in(evt_trig), .pulse(evt_pulse)
  );

  pd_trig_select u_tsel (
    .clk, .rst_n, .ext_pulse, .evt_pulse, .en_ext, .en_evt, .trig
  );

  pd_rec_ctrl #(.AVG_LOG2_MAX(AVG_LOG2_MAX)) u_rec_ctrl (
    .clk, .rst_n, .trig, .trig_delay, .roi_start, .avg_log2,
    .sample_valid(dpm_valid), .rec_start, .roi_gate, .roi_done, .busy, .trig_ignored
  );

  pd_wave_rec #(.W(NCH * ADC_W), .DEPTH(DEPTH)) u_rec_adc (
    .clk, .rst_n, .start(rec_start), .din(adc_data), .din_valid(1'b1),
    .rd_addr(rec_addr), .rd_data(adc_rd), .done(rec_done[0]), .active(rec_active[0])
  );

  pd_wave_rec #(.W(NCH * 2 * IQ_W), .DEPTH(DEPTH)) u_rec_iq (
    .clk, .rst_n, .start(rec_start), .din(iq), .din_valid(iq_valid),
    .rd_addr(rec_addr), .rd_data(iq_rd), .done(rec_done[1]), .active(rec_active[1])
  );

  pd_wave_rec #(.W(NCH * (PH_W + MAG_W)), .DEPTH(DEPTH)) u_rec_pm (
    .clk, .rst_n, .start(rec_start), .din(pmr), .din_valid(pmr_valid),
    .rd_addr(rec_addr), .rd_data(pm_rd), .done(rec_done[2]), .active(rec_active[2])
  );

  pd_average #(.AVG_LOG2_MAX(AVG_LOG2_MAX)) u_avg (
    .clk, .rst_n, .clr(rec_start), .gate(roi_gate), .done(roi_done), .avg_log2,
    .din(dpm), .valid(dpm_valid), .avg, .avg_valid
  );

  pd_host_regs #(.DEPTH(DEPTH)) u_host (
    .clk, .rst_n, .host_addr, .host_wr, .host_rd, .host_wdata, .host_rdata, .host_rvalid,
    .en_ext, .en_evt, .pm_sel, .iq_ofs, .evt_code(match_code), .trig_delay, .roi_start,
    .avg_log2, .iq_locked, .busy, .rec_done, .rec_active,
    .trig_accepted(trig && !busy), .trig_ignored, .avg_valid,
    .avg, .rec_addr, .adc_rd, .iq_rd, .pm_rd
  );

endmodule
