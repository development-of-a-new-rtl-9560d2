// Noise-floor workload on phdet_top at its default sizes: like the
// measurement of 512 samples of phase minus reference without averaging.
// All eight channels carry a 20 MHz carrier of amplitude 8000 counts with
// +/-2 counts of uniform noise (variance 2 + 1/12 counts^2 per sample after
// rounding). The phase & magnitude recorder is set to delta phase, one
// acquisition is triggered, and the 512 recorded delta phases of each of
// the six measured channels are read back. Their mean must equal the set
// phase difference within 2 counts, and their standard deviation must be
// within 25 % of sqrt(2) * sigma / A radians, the value the noise model
// predicts for the difference of two independent channels.
module tb_noise_floor;
  import phdet_pkg::*;

  localparam int DEPTH = 512, AW = 9, A = 8000;
  localparam real PI = 3.14159265358979;

  logic ref_in = 0, pll_locked, clk, clk20_m30;
  logic rst_n = 0, ext_trig = 0, evt_clk = 0;
  adc_t [NCH-1:0] adc_data;
  logic [15:0] host_addr = '0;
  logic host_wr = 0, host_rd = 0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic host_rvalid;
  int amp [NCH] = '{A, A, A, A, A, A, A, A};
  int phm [NCH] = '{0, 12000, -45000, 100000, 30000, 31000, -150000, 70000};
  int checks = 0, failures = 0;

  always #25ns ref_in = ~ref_in;
  always #5.1ns evt_clk = ~evt_clk;

  pd_pll_model u_pll (.ref_in, .clk80(clk), .clk20_m30, .locked(pll_locked));
  pd_adc_model #(.NOISE(2)) u_adc (.clk, .rf_on(1'b1), .amp, .phase_mdeg(phm), .adc(adc_data));

  phdet_top dut (
    .clk, .rst_n, .ref20(clk20_m30), .adc_data, .ext_trig, .evt_clk, .evt_rst_n(rst_n),
    .evt_code(8'd0), .evt_valid(1'b0), .host_addr, .host_wr, .host_rd, .host_wdata,
    .host_rdata, .host_rvalid
  );

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
    host_rd = 0;
    @(negedge clk);
    d = host_rdata;
  endtask

  function automatic int wrap16(input int d);
    int r = d % 65536;
    if (r >= 32768) r -= 65536;
    if (r < -32768) r += 65536;
    return r;
  endfunction

  initial begin
    logic [31:0] d;
    real sigma, pred, cnt_per_rad;
    wait (pll_locked);
    repeat (20) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    wr(16'h0000, 32'h5);               // external trigger, delta phase recorded
    #2.3ns ext_trig = 1;
    #60ns ext_trig = 0;
    do rd(16'h0005, d); while (d[4] == 1'b0 || d[1]);
    cnt_per_rad = 65536.0 / (2.0 * PI);
    sigma = $sqrt(2.0 + 1.0 / 12.0);
    pred = $sqrt(2.0) * sigma / real'(A) * cnt_per_rad;
    for (int ch = 1; ch < NCH; ch++) begin
      if (ch != 4) begin
        int e;
        real s, s2, mean, sd;
        s = 0.0; s2 = 0.0;
        e = wrap16($rtoi(real'(phm[ch] - phm[ch / 4 * 4]) / 360000.0 * 65536.0));
        for (int a = 0; a < DEPTH; a++) begin
          real v;
          rd(16'hc000 | 16'(ch << (AW + 1)) | 16'(a), d);
          v = real'(wrap16(int'(d) - e));
          s += v;
          s2 += v * v;
        end
        mean = s / DEPTH;
        sd = $sqrt(s2 / DEPTH - mean * mean);
        $display("ch%0d: mean offset %f counts, rms %f counts = %f deg (predicted %f deg)",
                 ch, mean, sd, sd * 360.0 / 65536.0, pred * 360.0 / 65536.0);
        check(mean > -2.0 && mean < 2.0, $sformatf("ch%0d mean", ch));
        check(sd > 0.75 * pred && sd < 1.25 * pred, $sformatf("ch%0d rms", ch));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
