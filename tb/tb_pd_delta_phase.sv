// Testbench of pd_delta_phase. Random phases and magnitudes enter; one cycle
// later every non-reference channel must hold its phase minus the phase of
// channel 0 (bank 0) or channel 4 (bank 1), wrapped to 16 bits, and the
// reference channels their own phase. Magnitudes and valid pass with one
// cycle delay.
module tb_pd_delta_phase;
  import phdet_pkg::*;

  logic clk = 0, rst_n = 0;
  pm_t [NCH-1:0] pm, dpm, prev;
  logic pm_valid, dpm_valid, prev_v;
  int checks = 0, failures = 0;

  pd_delta_phase dut (.clk, .rst_n, .pm, .pm_valid, .dpm, .dpm_valid);

  always #5 clk = ~clk;

  initial begin
    pm = '0; pm_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int c = 0; c < 500; c++) begin
      for (int ch = 0; ch < NCH; ch++) begin
        pm[ch].phase = phase_t'($urandom);
        pm[ch].mag   = mag_t'($urandom);
      end
      pm_valid = $urandom % 2;
      prev = pm; prev_v = pm_valid;
      @(negedge clk);
      checks++;
      if (dpm_valid != prev_v) failures++;
      for (int ch = 0; ch < NCH; ch++) begin
        int r;
        logic [15:0] e;
        r = (ch < 4) ? 0 : 4;
        e = (ch == r) ? prev[ch].phase : 16'(prev[ch].phase - prev[r].phase);
        checks++;
        if (dpm[ch].phase != e || dpm[ch].mag != prev[ch].mag) begin
          failures++;
          $display("FAIL ch%0d phase %h expected %h", ch, dpm[ch].phase, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
