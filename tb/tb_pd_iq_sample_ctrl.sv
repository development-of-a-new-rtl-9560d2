// Testbench of pd_iq_sample_ctrl. A 20 MHz square wave (period 4 clocks) is
// driven off the falling clock edge. Each cycle the testbench checks that the
// quadrature position equals the offset exactly two clocks after the square
// wave is first sampled high and otherwise advances by one, that `locked`
// rises after the programmed number of good edges, and that a phase jump of
// the reference drops the lock and realigns the sequence.
module tb_pd_iq_sample_ctrl;
  import phdet_pkg::*;

  logic clk = 0, rst_n = 0, ref20 = 0;
  logic [1:0] ofs = 2'd0;
  iq_phase_e iq_phase;
  logic locked;
  int checks = 0, failures = 0;
  int n = 0, shift = 0;
  logic [2:0] hist = '0;
  logic [1:0] prev;
  bit   have_prev = 0;
  int   good_edges = 0;
  bit   saw_unlock = 0;

  pd_iq_sample_ctrl #(.LOCK_EDGES(8)) dut (.clk, .rst_n, .ref20, .phase_ofs(ofs), .iq_phase, .locked);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    n++;
    ref20 <= ((n + shift) % 4) < 2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: iq_phase=%0d locked=%0b", what, $time, iq_phase, locked);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      hist <= {hist[1:0], ref20};
      #1;
      if (hist[2:1] == 2'b01) begin
        check(iq_phase == iq_phase_e'(ofs), "phase at edge");
        good_edges++;
      end else if (have_prev) begin
        check(iq_phase == iq_phase_e'(prev + 2'd1), "phase advance");
      end
      prev = iq_phase;
      have_prev = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // lock: 9 consistent edges (first realigns, then LOCK_EDGES good ones)
    repeat (60) @(posedge clk);
    #2 check(locked == 1'b1, "locked after good edges");
    // change the offset: lock lost, then regained
    ofs = 2'd2;
    repeat (6) @(posedge clk);
    #2 check(locked == 1'b0, "unlock on offset change");
    repeat (60) @(posedge clk);
    #2 check(locked == 1'b1, "relocked with new offset");
    // reference phase jump of one sample
    shift = 1;
    repeat (6) @(posedge clk);
    #2 check(locked == 1'b0, "unlock on phase jump");
    repeat (60) @(posedge clk);
    #2 check(locked == 1'b1, "relocked after jump");
    check(good_edges > 30, "enough edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
