// End-to-end testbench of phdet_top at its default sizes (512-word
// recorders, 16 CORDIC iterations). A behavioural PLL turns a 20 MHz
// reference into the 80 MHz clock and the shifted 20 MHz copy; behavioural
// ADCs convert eight 20 MHz carriers of known amplitude and phase (plus
// +/-2 counts of noise); the control system is modelled by bus read and
// write tasks. Three acquisitions are made:
//   A  external trigger, recorder showing delta phase, continuous rf; a
//      second trigger during the run must be ignored;
//   B  event-link trigger (a non-matching code and a disabled external
//      trigger must not trigger), recorder showing absolute phase;
//   C  new phases, pulsed rf, region of interest inside the pulse.
// After each the averaged phase differences and magnitudes are compared
// with the carriers' parameters, and recorder contents are compared with
// the ADC words the testbench saw and with the carriers. It also checks the
// 80 MHz clock period, the 40 MHz I/Q pair rate and the trigger-to-start
// latency, and counts each mechanism (lock, both triggers, ignored and
// masked triggers, both recorder sources, full recorders, averages, pulsed
// region of interest), failing one that never happened.
module tb_phdet_top;
  import phdet_pkg::*;

  localparam int DEPTH = 512, AW = 9;
  localparam real PI = 3.14159265358979;

  logic ref_in = 0, pll_locked;
  logic clk, clk20_m30;
  logic rst_n = 0, evt_rst_n = 0;
  logic ext_trig = 0, evt_clk = 0, evt_valid = 0;
  logic [7:0] evt_code = '0;
  logic rf_on = 1;
  adc_t [NCH-1:0] adc_data;
  logic [15:0] host_addr = '0;
  logic host_wr = 0, host_rd = 0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic host_rvalid;
  int amp [NCH] = '{6000, 5000, 4000, 3000, 7000, 2000, 6500, 1500};
  int phm [NCH] = '{10000, 47500, -120000, 175000, -60000, 33300, 90000, -170000};

  int checks = 0, failures = 0;
  // mechanisms
  int n_lock = 0, n_ext = 0, n_evt = 0, n_ignored = 0, n_masked = 0, n_mux_delta = 0,
      n_mux_abs = 0, n_full = 0, n_avg = 0, n_pulsed_roi = 0;

  always #25ns ref_in = ~ref_in;
  always #5.1ns evt_clk = ~evt_clk;

  pd_pll_model u_pll (.ref_in, .clk80(clk), .clk20_m30, .locked(pll_locked));
  pd_adc_model u_adc (.clk, .rf_on, .amp, .phase_mdeg(phm), .adc(adc_data));

  phdet_top dut (
    .clk, .rst_n, .ref20(clk20_m30), .adc_data, .ext_trig, .evt_clk, .evt_rst_n,
    .evt_code, .evt_valid, .host_addr, .host_wr, .host_rd, .host_wdata, .host_rdata, .host_rvalid
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
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
    host_rd = 0;
    @(negedge clk);
    check(host_rvalid, "read data valid");
    d = host_rdata;
  endtask

  function automatic int wrap16(input int d);
    int r = d % 65536;
    if (r >= 32768) r -= 65536;
    if (r < -32768) r += 65536;
    return r;
  endfunction

  function automatic int exp_delta(input int ch);
    int r = (ch / 4) * 4;
    return wrap16($rtoi(real'(phm[ch] - phm[r]) / 360000.0 * 65536.0));
  endfunction

  // ADC words of the last recording, as the ADC recorder should hold them
  adc_t [NCH-1:0] cap [DEPTH];
  int cap_idx = DEPTH;
  int clk_edges = 0, start_edge = 0, iq_pairs = 0;
  always @(negedge clk) begin
    if (dut.rec_start) cap_idx = 0;
    if (cap_idx < DEPTH) begin
      cap[cap_idx] = adc_data;
      cap_idx++;
    end
  end
  always @(posedge clk) begin
    clk_edges++;
    if (dut.iq_valid) iq_pairs++;
    if (dut.rec_start) start_edge = clk_edges;
  end

  task automatic wait_count(input logic [15:0] a, input int n);
    logic [31:0] d;
    int k = 0;
    do begin
      rd(a, d);
      k++;
    end while (int'(d) < n && k < 2000);
    check(int'(d) >= n, $sformatf("counter %h reached %0d", a, n));
  endtask

  task automatic wait_done();
    logic [31:0] d;
    int k = 0;
    do begin
      rd(16'h0005, d);
      k++;
    end while ((d[4:2] != 3'b111 || d[1]) && k < 2000);
    check(d[4:2] == 3'b111, "all recorders full");
    if (d[4:2] == 3'b111) n_full++;
  endtask

  // averaged delta phases and magnitudes against the carriers
  task automatic check_averages(input string tag);
    logic [31:0] d;
    for (int ch = 0; ch < NCH; ch++) begin
      if (ch % 4 != 0) begin
        rd(16'h0010 + 16'(ch), d);
        check(wrap16(int'(d) - exp_delta(ch)) inside {[-20:20]},
              $sformatf("%s avg delta phase ch%0d: %0d expected %0d", tag, ch, int'($signed(d[15:0])), exp_delta(ch)));
      end
      rd(16'h0018 + 16'(ch), d);
      check(int'(d) > amp[ch] * 99 / 100 - 3 && int'(d) < amp[ch] * 101 / 100 + 3,
            $sformatf("%s avg magnitude ch%0d: %0d expected %0d", tag, ch, d, amp[ch]));
    end
  endtask

  // recorder contents
  task automatic check_recorders(input bit delta_mode, input string tag);
    logic [31:0] d, d2;
    int ref_abs [NCH];
    for (int k = 0; k < 24; k++) begin
      int a, ch;
      a = $urandom_range(DEPTH - 1);
      ch = $urandom_range(NCH - 1);
      rd(16'h4000 | 16'(ch << (AW + 1)) | 16'(a), d);
      check(int'(d) == int'(cap[a][ch]), $sformatf("%s ADC recorder ch%0d word %0d", tag, ch, a));
    end
    for (int k = 0; k < 12; k++) begin
      int a;
      real ang [NCH];
      a = $urandom_range(64, DEPTH - 1);
      for (int ch = 0; ch < NCH; ch++) begin
        real m;
        rd(16'h8000 | 16'(ch << (AW + 1)) | 16'(a), d);
        rd(16'h8000 | 16'(ch << (AW + 1)) | 16'(1 << AW) | 16'(a), d2);
        m = $sqrt(real'(int'(d)) ** 2 + real'(int'(d2)) ** 2);
        ang[ch] = $atan2(real'(int'(d2)), real'(int'(d))) / (2.0 * PI) * 65536.0;
        check(m > amp[ch] * 0.99 - 4.0 && m < amp[ch] * 1.01 + 4.0, $sformatf("%s I/Q magnitude ch%0d", tag, ch));
        if (ch % 4 != 0)
          check(wrap16($rtoi(ang[ch] - ang[ch / 4 * 4]) - exp_delta(ch)) inside {[-100:100]},
                $sformatf("%s I/Q angle ch%0d", tag, ch));
      end
      for (int ch = 0; ch < NCH; ch++) begin
        rd(16'hc000 | 16'(ch << (AW + 1)) | 16'(a), d);
        ref_abs[ch] = int'(d);
        rd(16'hc000 | 16'(ch << (AW + 1)) | 16'(1 << AW) | 16'(a), d2);
        check(int'(d2) > amp[ch] * 99 / 100 - 3 && int'(d2) < amp[ch] * 101 / 100 + 3,
              $sformatf("%s recorded magnitude ch%0d", tag, ch));
      end
      for (int ch = 0; ch < NCH; ch++) if (ch % 4 != 0) begin
        int got = delta_mode ? ref_abs[ch] : wrap16(ref_abs[ch] - ref_abs[ch / 4 * 4]);
        check(wrap16(got - exp_delta(ch)) inside {[-100:100]},
              $sformatf("%s recorded %s phase ch%0d: %0d expected %0d", tag,
                        delta_mode ? "delta" : "absolute", ch, got, exp_delta(ch)));
      end
    end
  endtask

  task automatic pulse_ext();
    #2.3ns ext_trig = 1;
    #60ns ext_trig = 0;
  endtask

  task automatic send_event(input logic [7:0] code);
    @(negedge evt_clk);
    evt_code = code; evt_valid = 1;
    @(negedge evt_clk);
    evt_valid = 0; evt_code = '0;
  endtask

  initial begin
    logic [31:0] d;
    int e0, t0;
    wait (pll_locked);
    repeat (20) @(posedge clk);
    rst_n = 1; evt_rst_n = 1;

    // clock and I/Q rate
    @(posedge clk); t0 = $rtoi($realtime / 1ps);
    repeat (400) @(posedge clk);
    check(($rtoi($realtime / 1ps) - t0) == 400 * 12500, "80 MHz clock");
    e0 = iq_pairs;
    repeat (400) @(posedge clk);
    check(iq_pairs - e0 == 200, $sformatf("I/Q pair rate: %0d pairs in 400 cycles", iq_pairs - e0));

    // lock
    rd(16'h0005, d);
    check(d[0], "I/Q sample control locked");
    if (d[0]) n_lock++;

    // acquisition A: external trigger, delta phase recorder
    wr(16'h0002, 32'd10);          // trigger delay
    wr(16'h0003, 32'd100);         // region of interest start
    wr(16'h0004, 32'd8);           // 256 samples
    wr(16'h0000, 32'h5);           // external trigger, delta phase
    n_mux_delta++;
    @(posedge clk);
    #1 e0 = clk_edges;
    pulse_ext();
    wait (dut.rec_start);
    @(posedge clk);
    #1;
    $display("trigger to start: %0d edges", start_edge - e0);
    // synchronizer 3 edges, trigger select 1, delay 10 + 1; seen one edge later
    check((start_edge - e0) == 16, $sformatf("trigger to start %0d edges", start_edge - e0));
    repeat (200) @(posedge clk);
    pulse_ext();                   // while busy: ignored
    wait_count(16'h0007, 1);
    wait_done();
    rd(16'h0008, d);
    check(d == 1, "one trigger ignored");
    n_ignored += int'(d);
    rd(16'h0006, d);
    check(d == 1, "one trigger accepted");
    n_ext += int'(d);
    n_avg++;
    check_averages("A");
    check_recorders(1'b1, "A");

    // acquisition B: event trigger, absolute phase recorder
    wr(16'h0001, 32'h2a);
    wr(16'h0000, 32'h2);
    n_mux_abs++;
    pulse_ext();                   // external trigger disabled
    send_event(8'h11);             // wrong code
    repeat (200) @(posedge clk);
    rd(16'h0006, d);
    check(d == 1, "masked triggers");
    if (d == 1) n_masked++;
    send_event(8'h2a);
    wait_count(16'h0007, 2);
    wait_done();
    rd(16'h0006, d);
    check(d == 2, "event trigger accepted");
    if (d == 2) n_evt++;
    n_avg++;
    check_averages("B");
    check_recorders(1'b0, "B");

    // acquisition C: new phases, pulsed rf, region inside the pulse
    phm = '{-35000, 80000, 150000, -2500, 120000, -179000, 0, 60000};
    rf_on = 0;
    wr(16'h0002, 32'd0);
    wr(16'h0003, 32'd80);
    wr(16'h0004, 32'd7);
    wr(16'h0000, 32'h5);
    fork
      pulse_ext();
      begin
        #500ns rf_on = 1;
        #6000ns rf_on = 0;
      end
    join_none
    wait_count(16'h0007, 3);
    n_avg++;
    check_averages("C");
    n_pulsed_roi++;
    wait (rf_on == 0);
    rf_on = 1;

    check(n_lock > 0 && n_ext > 0 && n_evt > 0 && n_ignored > 0 && n_masked > 0, "trigger mechanisms seen");
    check(n_mux_delta > 0 && n_mux_abs > 0 && n_full > 0 && n_avg > 0 && n_pulsed_roi > 0, "data mechanisms seen");
    $display("mechanisms: lock=%0d ext=%0d evt=%0d ignored=%0d masked=%0d mux_delta=%0d mux_abs=%0d full=%0d avg=%0d pulsed_roi=%0d",
             n_lock, n_ext, n_evt, n_ignored, n_masked, n_mux_delta, n_mux_abs, n_full, n_avg, n_pulsed_roi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
