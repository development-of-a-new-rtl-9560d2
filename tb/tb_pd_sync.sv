// Testbench of pd_sync. An asynchronous level toggles at random times, not
// aligned with the clock, holding each value 3 to 40 clock periods. Every
// rising input edge must give exactly one output pulse, STAGES + 1 or
// STAGES + 2 clock edges later (depending on where the edge falls), and
// falling edges none.
module tb_pd_sync;
  localparam int STAGES = 2;

  logic clk = 0, rst_n = 0, async_in = 0, pulse;
  int checks = 0, failures = 0, rises = 0, pulses = 0;
  int edges_since_rise = -1;

  pd_sync #(.STAGES(STAGES)) dut (.clk, .rst_n, .async_in, .pulse);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (edges_since_rise >= 0) edges_since_rise++;
    #1;
    if (pulse) begin
      pulses++;
      checks++;
      if (!(edges_since_rise inside {STAGES + 1, STAGES + 2})) begin
        failures++;
        $display("FAIL pulse %0d edges after the rise", edges_since_rise);
      end
      edges_since_rise = -1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      #($urandom_range(30, 400) + 0.37);
      async_in = ~async_in;
      if (async_in) begin
        rises++;
        edges_since_rise = 0;
      end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (pulses != rises) begin
      failures++;
      $display("FAIL %0d rises, %0d pulses", rises, pulses);
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
