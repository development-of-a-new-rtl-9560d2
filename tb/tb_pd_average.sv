// Testbench of pd_average. For several sample counts 2^L it clears the
// sums, feeds random phases and magnitudes with random valid and gate
// patterns (samples outside the gate must be ignored), signals done, and
// compares the result with the sum of the gated samples divided by 2^L and
// rounded (floor((sum + 2^(L-1)) / 2^L)), computed in 64-bit integers.
// The result must appear with avg_valid two cycles after done.
module tb_pd_average;
  import phdet_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, gate = 0, done = 0, valid = 0;
  logic [3:0] avg_log2 = '0;
  pm_t [NCH-1:0] din, avg;
  logic avg_valid;
  int checks = 0, failures = 0;

  pd_average dut (.clk, .rst_n, .clr, .gate, .done, .avg_log2, .din, .valid, .avg, .avg_valid);

  always #5 clk = ~clk;

  task automatic run(input int l, input int prange);
    longint ps [NCH], ms [NCH];
    int taken, n;
    n = 1 << l;
    foreach (ps[ch]) begin ps[ch] = 0; ms[ch] = 0; end
    avg_log2 = 4'(l);
    taken = 0;
    @(negedge clk);
    clr = 1;
    while (taken < n) begin
      valid = ($urandom % 2);
      gate  = ($urandom % 4) != 0;
      if (taken == n - 1) gate = 1;
      for (int ch = 0; ch < NCH; ch++) begin
        din[ch].phase = phase_t'($urandom_range(2 * prange) - prange);
        din[ch].mag   = mag_t'($urandom_range(12000));
      end
      if (valid && gate) begin
        for (int ch = 0; ch < NCH; ch++) begin
          ps[ch] += longint'(din[ch].phase);
          ms[ch] += longint'(din[ch].mag);
        end
        taken++;
      end
      @(negedge clk);
      clr = 0;
    end
    valid = 0; gate = 0; done = 1;
    @(negedge clk);
    done = 0;
    check(!avg_valid, "no early valid");
    @(negedge clk);
    check(avg_valid, "avg_valid two cycles after done");
    for (int ch = 0; ch < NCH; ch++) begin
      longint r, ep, em;
      r  = (l == 0) ? 0 : (longint'(1) << (l - 1));
      ep = (ps[ch] + r) >>> l;
      em = (ms[ch] + r) >>> l;
      check(longint'(avg[ch].phase) == ep && longint'(avg[ch].mag) == em,
            $sformatf("L=%0d ch%0d phase %0d exp %0d mag %0d exp %0d", l, ch,
                      int'(avg[ch].phase), ep, int'(avg[ch].mag), em));
    end
    @(negedge clk);
    check(!avg_valid, "single avg_valid");
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(0, 30000);
    run(1, 300);
    run(3, 30000);
    run(6, 500);
    run(10, 32000);
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
