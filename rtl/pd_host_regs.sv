// pd_host_regs: control-system interface of the phase detector.
//
// The board's I/O controller reads and writes 32-bit words through a simple
// synchronous bus in the 80 MHz domain. The 16-bit word address selects one
// of four regions with its two top bits:
//   0: registers     1: ADC recorder     2: I/Q recorder     3: phase & magnitude recorder
// Registers (region 0, address bits 7:0):
//   0x00 CTRL        rw  [0] external trigger enable  [1] event trigger enable
//                        [2] recorder source: 0 phase/magnitude, 1 delta phase
//                        [5:4] quadrature offset of the I/Q sample control
//   0x01 EVT_CODE    rw  [7:0] event code that triggers
//   0x02 TRIG_DELAY  rw  [15:0] 80 MHz cycles from trigger to recording
//   0x03 ROI_START   rw  [15:0] first averaged I/Q sample after the start
//   0x04 AVG_LOG2    rw  [3:0] log2 of the number of averaged samples
//   0x05 STATUS      ro  [0] I/Q sampling locked [1] busy [2] ADC recorder done
//                        [3] I/Q recorder done [4] phase recorder done
//                        [7:5] ADC, I/Q, phase recorder recording
//   0x06 TRIG_COUNT  ro  accepted triggers
//   0x07 AVG_COUNT   ro  completed averages
//   0x08 IGN_COUNT   ro  triggers ignored because a recording was running
//   0x10+ch          ro  averaged phase of channel ch, sign-extended
//   0x18+ch          ro  averaged magnitude of channel ch
// Recorder regions: bits AW-1:0 sample, bit AW field, bits AW+3:AW+1 channel.
//   ADC: field ignored, sample sign-extended. I/Q: field 0 = I, 1 = Q.
//   Phase & magnitude: field 0 = phase (sign-extended), 1 = magnitude.
//
// Timing: a read (`host_rd`) returns `host_rdata` with `host_rvalid` two
// cycles later, for registers and recorders alike; a write takes effect at
// the next clock edge. Reads and writes must not be issued in the same cycle.
// From the description: the recorders and scalars are read by the control
// system, which also chooses trigger, region of interest and sample count.
// The bus, the map and the reset values are this design's own.
module pd_host_regs
  import phdet_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // bus
  input  logic [15:0]          host_addr,
  input  logic                 host_wr,
  input  logic                 host_rd,
  input  logic [31:0]          host_wdata,
  output logic [31:0]          host_rdata,
  output logic                 host_rvalid,
  // control
  output logic                 en_ext,
  output logic                 en_evt,
  output logic                 pm_sel,
  output logic [1:0]           iq_ofs,
  output logic [7:0]           evt_code,
  output logic [15:0]          trig_delay,
  output logic [15:0]          roi_start,
  output logic [3:0]           avg_log2,
  // status
  input  logic                 iq_locked,
  input  logic                 busy,
  input  logic [2:0]           rec_done,
  input  logic [2:0]           rec_active,
  input  logic                 trig_accepted,
  input  logic                 trig_ignored,
  input  logic                 avg_valid,
  input  pm_t      [NCH-1:0]   avg,
  // recorder read ports
  output logic [AW-1:0]        rec_addr,
  input  adc_t     [NCH-1:0]   adc_rd,
  input  iq_pair_t [NCH-1:0]   iq_rd,
  input  pm_t      [NCH-1:0]   pm_rd
);

  typedef enum logic [1:0] {RG_REGS, RG_ADC, RG_IQ, RG_PM} region_e;

  logic [31:0] trig_count, avg_count, ign_count;
  logic [31:0] reg_rdata;
  logic        rd_q;
  logic [31:0] reg_q;
  region_e     region_q;
  logic [2:0]  ch_q;
  logic        field_q;

  initial assert (AW + 4 <= 14) else $error("recorder DEPTH too large for the address map");

  assign rec_addr = host_addr[AW-1:0];

  // writes and counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_ext     <= 1'b1;
      en_evt     <= 1'b0;
      pm_sel     <= 1'b1;
      iq_ofs     <= 2'd0;
      evt_code   <= 8'd0;
      trig_delay <= 16'd0;
      roi_start  <= 16'd0;
      avg_log2   <= 4'd0;
      trig_count <= '0;
      avg_count  <= '0;
      ign_count  <= '0;
    end else begin
      if (trig_ignored)  ign_count  <= ign_count + 1'b1;
      if (trig_accepted) trig_count <= trig_count + 1'b1;
      if (avg_valid)     avg_count  <= avg_count + 1'b1;
      if (host_wr && host_addr[15:14] == RG_REGS) begin
        unique case (host_addr[7:0])
          8'h00: begin
            en_ext <= host_wdata[0];
            en_evt <= host_wdata[1];
            pm_sel <= host_wdata[2];
            iq_ofs <= host_wdata[5:4];
          end
          8'h01: evt_code   <= host_wdata[7:0];
          8'h02: trig_delay <= host_wdata[15:0];
          8'h03: roi_start  <= host_wdata[15:0];
          8'h04: avg_log2   <= host_wdata[3:0];
          default: ;
        endcase
      end
    end
  end

  // register read mux
  always_comb begin
    reg_rdata = '0;
    unique casez (host_addr[7:0])
      8'h00: reg_rdata = {26'd0, iq_ofs, 1'b0, pm_sel, en_evt, en_ext};
      8'h01: reg_rdata = {24'd0, evt_code};
      8'h02: reg_rdata = {16'd0, trig_delay};
      8'h03: reg_rdata = {16'd0, roi_start};
      8'h04: reg_rdata = {28'd0, avg_log2};
      8'h05: reg_rdata = {24'd0, rec_active, rec_done, busy, iq_locked};
      8'h06: reg_rdata = trig_count;
      8'h07: reg_rdata = avg_count;
      8'h08: reg_rdata = ign_count;
      8'b0001_0???: reg_rdata = 32'(avg[host_addr[2:0]].phase);
      8'b0001_1???: reg_rdata = {16'd0, avg[host_addr[2:0]].mag};
      default: reg_rdata = '0;
    endcase
  end

  // read pipeline: stage 1 captures address and register data while the
  // recorders read; stage 2 selects the word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q        <= 1'b0;
      reg_q       <= '0;
      region_q    <= RG_REGS;
      ch_q        <= '0;
      field_q     <= 1'b0;
      host_rdata  <= '0;
      host_rvalid <= 1'b0;
    end else begin
      rd_q        <= host_rd;
      reg_q       <= reg_rdata;
      region_q    <= region_e'(host_addr[15:14]);
      ch_q        <= host_addr[AW+3:AW+1];
      field_q     <= host_addr[AW];
      host_rvalid <= rd_q;
      if (rd_q) begin
        unique case (region_q)
          RG_REGS: host_rdata <= reg_q;
          RG_ADC:  host_rdata <= 32'(adc_rd[ch_q]);
          RG_IQ:   host_rdata <= field_q ? 32'(iq_rd[ch_q].q) : 32'(iq_rd[ch_q].i);
          RG_PM:   host_rdata <= field_q ? {16'd0, pm_rd[ch_q].mag} : 32'(pm_rd[ch_q].phase);
        endcase
      end
    end
  end

  assert property (@(posedge clk) !(host_rd && host_wr))
    else $error("host read and write in the same cycle");

endmodule
