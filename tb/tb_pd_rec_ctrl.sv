// Testbench of pd_rec_ctrl. For a set of trigger delays, region starts and
// sample counts it sends a trigger and checks, cycle by cycle, against a
// count kept in the testbench: rec_start exactly trig_delay + 1 cycles after
// the trigger; roi_gate high on exactly the samples numbered roi_start to
// roi_start + 2^avg_log2 - 1 counted from the start cycle; roi_done in the
// cycle after the last of them; busy until then; a second trigger during
// the run reported as ignored and not restarting anything.
module tb_pd_rec_ctrl;
  logic clk = 0, rst_n = 0, trig = 0, sample_valid = 0;
  logic [15:0] trig_delay = '0, roi_start = '0;
  logic [3:0]  avg_log2 = '0;
  logic rec_start, roi_gate, roi_done, busy, trig_ignored;
  int checks = 0, failures = 0;

  pd_rec_ctrl dut (.clk, .rst_n, .trig, .trig_delay, .roi_start, .avg_log2, .sample_valid,
                   .rec_start, .roi_gate, .roi_done, .busy, .trig_ignored);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input int d, input int r, input int l);
    int k, idx, n, starts;
    bit ignored_sent;
    n = 1 << ((l > 10) ? 10 : l);
    @(posedge clk); #1;
    trig_delay = 16'(d); roi_start = 16'(r); avg_log2 = 4'(l);
    trig = 1; sample_valid = $urandom % 2;
    #3 check(!busy && !trig_ignored, "idle before trigger");
    k = 0;
    do begin
      @(posedge clk); #1;
      trig = 0; sample_valid = $urandom % 2;
      k++;
      #3;
      if (!rec_start) check(busy && !roi_done, "busy during delay");
    end while (!rec_start && k < 100);
    check(k == d + 1, $sformatf("start delay %0d, expected %0d", k, d + 1));
    // sample counting from the start cycle
    idx = 0; starts = 0; ignored_sent = 0;
    forever begin
      check(roi_gate == (idx >= r && idx < r + n), $sformatf("gate at sample %0d", idx));
      check(!roi_done, "no early done");
      if (trig) check(trig_ignored, "second trigger ignored");
      if (sample_valid) idx++;
      if (idx == r + n && sample_valid) begin
        @(posedge clk); #1;
        trig = 0;
        #3 check(roi_done && !busy && !roi_gate, "done after last sample");
        break;
      end
      @(posedge clk); #1;
      sample_valid = $urandom % 2;
      trig = (!ignored_sent && idx == r / 2 + 1);
      ignored_sent |= trig;
      #3;
      starts += rec_start;
      if (idx > r + n + 10) break;
    end
    check(starts == 0, "no restart by ignored trigger");
    @(posedge clk); #1;
    sample_valid = 0;
    #3 check(!roi_done && !busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(0, 0, 0);
    run(0, 3, 2);
    run(1, 0, 3);
    run(5, 7, 1);
    run(37, 20, 5);
    run(2, 1, 10);
    run(3, 2, 12);   // clamped to 2^10 samples
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
