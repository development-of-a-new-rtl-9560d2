// pd_wave_rec: waveform recorder.
//
// Stores DEPTH consecutive words of a data stream in a simple dual-port
// memory so that the control system can read them back for display and
// troubleshooting. `start` restarts the recording at address 0 (the word
// valid in the start cycle is stored first); every following word with
// `din_valid` goes to the next address until DEPTH words are stored, then
// `done` rises and the memory holds still until the next start.
//
// Read port: `rd_addr` in, `rd_data` one cycle later (synchronous read, as
// in FPGA block memory). Reading during a recording returns whatever the
// address holds at that moment.
// From the description: a recorder memory after each processing step,
// readable by the control system, started by the recorder sample control.
// Depth, port style and the stop-when-full rule are this design's own.
module pd_wave_rec #(
  parameter int unsigned W     = 112,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  din,
  input  logic          din_valid,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic          done,
  output logic          active
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [AW-1:0] wr_addr;
  logic          wr_en;

  assign wr_en   = din_valid && (active || start);
  assign wr_addr = start ? '0 : wr_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      active <= 1'b0;
      done   <= 1'b0;
    end else begin
      if (start) begin
        active <= 1'b1;
        done   <= 1'b0;
        wr_ptr <= '0;
      end
      if (wr_en) begin
        if (wr_addr == AW'(DEPTH - 1)) begin
          active <= 1'b0;
          done   <= 1'b1;
          wr_ptr <= '0;
        end else begin
          wr_ptr <= wr_addr + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= din;
    rd_data <= mem[rd_addr];
  end

endmodule
