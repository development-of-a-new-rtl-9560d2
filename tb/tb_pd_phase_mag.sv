// Testbench of pd_phase_mag (and pd_cordic). Random I/Q vectors of every
// angle and of magnitudes up to the full 14-bit range enter on random
// cycles. Each output is compared with atan2 and sqrt computed in real
// arithmetic: phase within 3 counts of 2^16 per turn (plus a rounding
// term 2000/magnitude for small vectors), magnitude within
// 2 counts plus 0.05 %. The output valid pattern must equal the input
// pattern delayed by ITER + 2 cycles.
module tb_pd_phase_mag;
  import phdet_pkg::*;

  localparam int ITER = 16;
  localparam int LAT  = ITER + 2;
  localparam real PI  = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  iq_pair_t [NCH-1:0] iq;
  logic iq_valid;
  pm_t [NCH-1:0] pm;
  logic pm_valid;
  int checks = 0, failures = 0, outputs = 0;

  iq_pair_t [NCH-1:0] q_iq [$];
  logic v_hist [$];

  pd_phase_mag #(.ITER(ITER)) dut (.clk, .rst_n, .iq, .iq_valid, .pm, .pm_valid);

  always #5 clk = ~clk;

  function automatic int wrap16(input int d);
    int r = d % 65536;
    if (r >= 32768) r -= 65536;
    if (r < -32768) r += 65536;
    return r;
  endfunction

  initial begin
    iq = '0;
    iq_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      iq_valid = ($urandom % 3) != 0;
      for (int ch = 0; ch < NCH; ch++) begin
        real a, m;
        a = $urandom / 4294967296.0 * 2.0 * PI;
        m = (c % 500 == 7) ? 11585.0 : 1.0 + ($urandom % 8191);
        iq[ch].i = iq_t'($rtoi(m * $cos(a)));
        iq[ch].q = iq_t'($rtoi(m * $sin(a)));
      end
      if (c == 11) for (int ch = 0; ch < NCH; ch++) begin
        iq[ch].i = -iq_t'(8192); iq[ch].q = iq_t'(ch * 5);  // near 180 degrees
      end
    end
    @(negedge clk);
    iq_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (outputs < 1500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    v_hist.push_back(iq_valid);
    if (iq_valid) q_iq.push_back(iq);
  end

  always @(negedge clk) if (rst_n && v_hist.size() > LAT - 1) begin
    logic exp_v;
    iq_pair_t [NCH-1:0] x;
    exp_v = v_hist.pop_front();
    checks++;
    if (pm_valid != exp_v) begin
      failures++;
      $display("FAIL valid timing at %0t: got %0b", $time, pm_valid);
    end
    if (pm_valid) begin
      x = q_iq.pop_front();
      outputs++;
      for (int ch = 0; ch < NCH; ch++) begin
        real ri, rq, ang, mag, dm;
        int dp;
        ri  = real'(x[ch].i);
        rq  = real'(x[ch].q);
        ang = $atan2(rq, ri) / (2.0 * PI) * 65536.0;
        mag = $sqrt(ri * ri + rq * rq);
        dp  = wrap16(int'(pm[ch].phase) - $rtoi(ang + (ang >= 0 ? 0.5 : -0.5)));
        dm  = real'(pm[ch].mag) - mag;
        checks++;
        if (real'(dp) > 3.0 + 2000.0 / mag || real'(dp) < -3.0 - 2000.0 / mag || dm > 2.0 + mag * 0.0005 || dm < -2.0 - mag * 0.0005) begin
          failures++;
          $display("FAIL ch%0d I=%0d Q=%0d: phase %0d (exp %f) mag %0d (exp %f)",
                   ch, int'(x[ch].i), int'(x[ch].q), int'(pm[ch].phase), ang, int'(pm[ch].mag), mag);
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
