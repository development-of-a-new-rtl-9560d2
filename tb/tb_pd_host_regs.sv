// Testbench of pd_host_regs. It writes every control register and reads it
// back, checks that the control outputs follow the writes, counts trigger,
// average and ignored-trigger pulses against the counters, reads status and
// the averaged scalars, and reads recorder words of all three regions from
// memories modelled here (each word a fixed function of region, address and
// channel, returned one cycle after the address). Every read must return
// two cycles after host_rd.
module tb_pd_host_regs;
  import phdet_pkg::*;

  localparam int DEPTH = 512, AW = 9;

  logic clk = 0, rst_n = 0;
  logic [15:0] host_addr = '0;
  logic host_wr = 0, host_rd = 0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic host_rvalid;
  logic en_ext, en_evt, pm_sel;
  logic [1:0] iq_ofs;
  logic [7:0] evt_code;
  logic [15:0] trig_delay, roi_start;
  logic [3:0] avg_log2;
  logic iq_locked = 0, busy = 0, trig_accepted = 0, trig_ignored = 0, avg_valid = 0;
  logic [2:0] rec_done = '0, rec_active = '0;
  pm_t [NCH-1:0] avg;
  logic [AW-1:0] rec_addr;
  adc_t [NCH-1:0] adc_rd;
  iq_pair_t [NCH-1:0] iq_rd;
  pm_t [NCH-1:0] pm_rd;
  int checks = 0, failures = 0;

  pd_host_regs #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] word(input int region, input int a, input int ch, input int f);
    return 16'((a * 2654435761 + region * 40503 + ch * 977 + f * 131) >> 7);
  endfunction

  // recorder memories: synchronous read
  always @(posedge clk) begin
    for (int ch = 0; ch < NCH; ch++) begin
      adc_rd[ch]      <= adc_t'(word(1, int'(rec_addr), ch, 0));
      iq_rd[ch].i     <= iq_t'(word(2, int'(rec_addr), ch, 0));
      iq_rd[ch].q     <= iq_t'(word(2, int'(rec_addr), ch, 1));
      pm_rd[ch].phase <= phase_t'(word(3, int'(rec_addr), ch, 0));
      pm_rd[ch].mag   <= mag_t'(word(3, int'(rec_addr), ch, 1));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    host_addr = a; host_wdata = d; host_wr = 1;
    @(negedge clk);
    host_wr = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    host_addr = a; host_rd = 1;
    @(negedge clk);
    host_rd = 0; host_addr = $urandom;
    check(!host_rvalid, "no data after one cycle");
    @(negedge clk);
    check(host_rvalid, "data after two cycles");
    d = host_rdata;
  endtask

  task automatic expect_rd(input logic [15:0] a, input logic [31:0] e, input string what);
    logic [31:0] d;
    rd(a, d);
    check(d == e, $sformatf("%s: read %h expected %h", what, d, e));
  endtask

  initial begin
    logic [31:0] d;
    for (int ch = 0; ch < NCH; ch++) begin
      avg[ch].phase = phase_t'(-1000 * ch - 7);
      avg[ch].mag   = mag_t'(300 * ch + 5);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    expect_rd(16'h0000, 32'h0000_0005, "CTRL reset value");
    wr(16'h0000, 32'hffff_ff32);
    check(!en_ext && en_evt && !pm_sel && iq_ofs == 2'd3, "CTRL outputs");
    expect_rd(16'h0000, 32'h0000_0032, "CTRL");
    wr(16'h0001, 32'h1234_56a7);
    check(evt_code == 8'ha7, "EVT_CODE output");
    expect_rd(16'h0001, 32'h0000_00a7, "EVT_CODE");
    wr(16'h0002, 32'h0001_0123);
    expect_rd(16'h0002, 32'h0000_0123, "TRIG_DELAY");
    check(trig_delay == 16'h0123, "TRIG_DELAY output");
    wr(16'h0003, 32'h0000_0040);
    expect_rd(16'h0003, 32'h0000_0040, "ROI_START");
    check(roi_start == 16'h0040, "ROI_START output");
    wr(16'h0004, 32'h0000_00f9);
    expect_rd(16'h0004, 32'h0000_0009, "AVG_LOG2");
    check(avg_log2 == 4'd9, "AVG_LOG2 output");
    // writes to recorder regions change nothing
    wr(16'h4004, 32'h0);
    check(avg_log2 == 4'd9, "recorder region write ignored");
    // status
    iq_locked = 1; busy = 0; rec_done = 3'b101; rec_active = 3'b010;
    expect_rd(16'h0005, 32'h0000_0055, "STATUS");
    // counters
    for (int k = 0; k < 13; k++) begin
      @(negedge clk);
      trig_accepted = (k % 2 == 0); avg_valid = (k % 3 == 0); trig_ignored = (k % 4 == 0);
    end
    @(negedge clk);
    trig_accepted = 0; avg_valid = 0; trig_ignored = 0;
    expect_rd(16'h0006, 32'd7, "TRIG_COUNT");
    expect_rd(16'h0007, 32'd5, "AVG_COUNT");
    expect_rd(16'h0008, 32'd4, "IGN_COUNT");
    for (int ch = 0; ch < NCH; ch++) begin
      expect_rd(16'h0010 + 16'(ch), 32'(avg[ch].phase), $sformatf("AVG_PHASE %0d", ch));
      expect_rd(16'h0018 + 16'(ch), {16'd0, avg[ch].mag}, $sformatf("AVG_MAG %0d", ch));
    end
    // recorders
    for (int k = 0; k < 60; k++) begin
      int a, ch, f, region;
      logic [15:0] w;
      logic [31:0] e;
      a = $urandom_range(DEPTH - 1); ch = $urandom_range(NCH - 1); f = $urandom % 2;
      region = 1 + k % 3;
      w = word(region, a, ch, (region == 1) ? 0 : f);
      case (region)
        1: e = 32'(signed'(w[13:0]));
        2: e = 32'(signed'(w));
        default: e = f ? {16'd0, w} : 32'(signed'(w));
      endcase
      expect_rd(16'(region << 14) | 16'(ch << (AW + 1)) | 16'(f << AW) | 16'(a), e,
                $sformatf("recorder %0d ch%0d field %0d addr %0d", region, ch, f, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
