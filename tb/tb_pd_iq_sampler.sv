// Testbench of pd_iq_sampler. Random ADC words enter every cycle with the
// quadrature position cycling 0..3. For every valid output pair the
// testbench rebuilds I and Q from the two input samples that formed it
// (I = +x or -x at positions 0/2, Q = -x or +x at positions 1/3) and
// compares all eight channels; it also checks one pair per two cycles.
module tb_pd_iq_sampler;
  import phdet_pkg::*;

  logic clk = 0, rst_n = 0;
  adc_t [NCH-1:0] adc;
  iq_phase_e iq_phase;
  iq_pair_t [NCH-1:0] iq;
  logic iq_valid;
  int checks = 0, failures = 0, pairs = 0, cycles = 0;

  adc_t [NCH-1:0] x_hist [3];
  logic [1:0]     p_hist [3];

  pd_iq_sampler dut (.clk, .rst_n, .adc, .iq_phase, .iq, .iq_valid);

  always #5 clk = ~clk;

  initial begin
    adc = '0;
    iq_phase = PH_I_POS;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int ch = 0; ch < NCH; ch++) adc[ch] = adc_t'($urandom);
      if (c % 200 == 0) begin
        adc[0] = -14'sd8192;  // most negative code
        adc[1] = 14'sd8191;
      end
      iq_phase = iq_phase_e'(c[1:0]);
    end
    @(negedge clk);
    if (!(pairs > 990 && pairs < 1010)) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of the inputs as the input register sees them
  always @(posedge clk) begin
    x_hist[2] <= x_hist[1]; x_hist[1] <= x_hist[0]; x_hist[0] <= adc;
    p_hist[2] <= p_hist[1]; p_hist[1] <= p_hist[0]; p_hist[0] <= iq_phase;
  end

  always @(negedge clk) begin
    if (rst_n) cycles++;
    if (rst_n && iq_valid && cycles > 4) begin
      pairs++;
      for (int ch = 0; ch < NCH; ch++) begin
        int ei, eq;
        ei = 0; eq = 0;
        // x_hist[1]: Q sample, x_hist[2]: I sample
        eq = (p_hist[1] == 2'd1) ? -int'(x_hist[1][ch]) : int'(x_hist[1][ch]);
        ei = (p_hist[2] == 2'd0) ?  int'(x_hist[2][ch]) : -int'(x_hist[2][ch]);
        checks++;
        if (int'(iq[ch].i) != ei || int'(iq[ch].q) != eq || !(p_hist[1] inside {2'd1, 2'd3})) begin
          failures++;
          $display("FAIL ch%0d: got I=%0d Q=%0d expected I=%0d Q=%0d", ch, iq[ch].i, iq[ch].q, ei, eq);
        end
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
