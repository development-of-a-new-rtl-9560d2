// Testbench of pd_trig_select: all sixteen combinations of the two trigger
// pulses and their enables, repeated in random order; one cycle later the
// output must be (ext AND en_ext) OR (evt AND en_evt).
module tb_pd_trig_select;
  logic clk = 0, rst_n = 0, ext_pulse = 0, evt_pulse = 0, en_ext = 0, en_evt = 0, trig;
  int checks = 0, failures = 0;

  pd_trig_select dut (.clk, .rst_n, .ext_pulse, .evt_pulse, .en_ext, .en_evt, .trig);

  always #5 clk = ~clk;

  initial begin
    logic e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int c = 0; c < 256; c++) begin
      logic [3:0] v;
      v = (c < 16) ? 4'(c) : 4'($urandom);
      {ext_pulse, evt_pulse, en_ext, en_evt} = v;
      e = (v[3] & v[1]) | (v[2] & v[0]);
      @(negedge clk);
      checks++;
      if (trig != e) begin
        failures++;
        $display("FAIL inputs %b: trig=%0b", v, trig);
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
