// Testbench of pd_event_rx. Random event codes (including the null code and
// the selected code) arrive on random event clock cycles. After each cycle
// evt_trig must be high exactly when a matching, valid, non-null code came
// within the last STRETCH cycles.
module tb_pd_event_rx;
  localparam int STRETCH = 4;

  logic evt_clk = 0, evt_rst_n = 0, evt_valid = 0;
  logic [7:0] evt_code = '0, match_code = 8'h2a;
  logic evt_trig;
  int checks = 0, failures = 0, hits = 0;
  int since = 1000;

  pd_event_rx #(.STRETCH(STRETCH)) dut (.evt_clk, .evt_rst_n, .evt_code, .evt_valid, .match_code, .evt_trig);

  always #4 evt_clk = ~evt_clk;

  initial begin
    repeat (3) @(posedge evt_clk);
    evt_rst_n <= 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge evt_clk);
      evt_valid = ($urandom % 4) == 0;
      case ($urandom % 4)
        0: evt_code = match_code;
        1: evt_code = 8'h00;
        default: evt_code = 8'($urandom);
      endcase
      if (c == 1000) match_code = 8'h00;   // null code never matches
      if (c == 1500) match_code = 8'h7d;
      @(posedge evt_clk);
      if (evt_valid && evt_code == match_code && match_code != 0) begin
        since = 0; hits++;
      end else since++;
      #1;
      checks++;
      if (evt_trig != (since < STRETCH)) begin
        failures++;
        $display("FAIL cycle %0d: evt_trig=%0b since=%0d", c, evt_trig, since);
      end
    end
    checks++;
    if (hits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge evt_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
