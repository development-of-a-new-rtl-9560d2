// Testbench of pd_pm_mux: random streams on both inputs with independent
// valid flags and a random select; one cycle later the output must be the
// selected stream and its valid flag.
module tb_pd_pm_mux;
  import phdet_pkg::*;

  logic clk = 0, rst_n = 0, sel;
  pm_t [NCH-1:0] pm, dpm, out, e;
  logic pm_valid, dpm_valid, out_valid, ev;
  int checks = 0, failures = 0, n_sel = 0;

  pd_pm_mux dut (.clk, .rst_n, .sel, .pm, .pm_valid, .dpm, .dpm_valid, .out, .out_valid);

  always #5 clk = ~clk;

  initial begin
    pm = '0; dpm = '0; sel = 0; pm_valid = 0; dpm_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int c = 0; c < 400; c++) begin
      for (int ch = 0; ch < NCH; ch++) begin
        pm[ch]  = pm_t'({$urandom, $urandom});
        dpm[ch] = pm_t'({$urandom, $urandom});
      end
      pm_valid = $urandom % 2; dpm_valid = $urandom % 2; sel = $urandom % 2;
      n_sel += sel;
      e  = sel ? dpm : pm;
      ev = sel ? dpm_valid : pm_valid;
      @(negedge clk);
      checks++;
      if (out != e || out_valid != ev) begin
        failures++;
        $display("FAIL cycle %0d sel=%0b", c, sel);
      end
    end
    checks++;
    if (n_sel < 100 || n_sel > 300) failures++;
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
