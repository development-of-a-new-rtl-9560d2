// Testbench of pd_wave_rec, with a 16-word memory. A counting data stream
// with random valid gaps is recorded after a start pulse (the word valid in
// the start cycle included). The testbench checks `done` after exactly DEPTH
// words, reads every address back (one-cycle read latency) against the words
// it saw go in, checks that later words do not overwrite a full recording,
// and that a start during a recording begins a new one at address 0.
module tb_pd_wave_rec;
  localparam int W = 24, DEPTH = 16;

  logic clk = 0, rst_n = 0, start = 0, din_valid = 0;
  logic [W-1:0] din = '0, rd_data;
  logic [3:0] rd_addr = '0;
  logic done, active;
  int checks = 0, failures = 0;
  logic [W-1:0] expect_mem [DEPTH];

  pd_wave_rec #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .start, .din, .din_valid, .rd_addr, .rd_data, .done, .active);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // record DEPTH words; abort_after > 0 restarts after that many words
  task automatic record(input int abort_after);
    int n = 0;
    @(negedge clk);
    start = 1;
    do begin
      din = W'($urandom);
      din_valid = ($urandom % 3) != 0;
      if (start && abort_after == 0) check(!done || n == 0, "start clears");
      if (din_valid) begin
        expect_mem[n] = din;
        n++;
      end
      @(negedge clk);
      start = 0;
      if (abort_after > 0 && n == abort_after) begin
        check(active && !done, "active before restart");
        start = 1;
        n = 0;
        abort_after = 0;
      end
    end while (n < DEPTH);
    din_valid = 0;
    check(done && !active, "done after DEPTH words");
  endtask

  task automatic readback();
    // keep streaming words: they must not land in a full memory
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr = 4'(a);
      din = W'($urandom);
      din_valid = 1;
      @(negedge clk);
      check(rd_data == expect_mem[a], $sformatf("word %0d", a));
    end
    din_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    record(0);
    readback();
    record(5);
    readback();
    record(0);
    readback();
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
