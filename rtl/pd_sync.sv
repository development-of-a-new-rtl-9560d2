// pd_sync: trigger synchronizer into the 80 MHz domain.
//
// An asynchronous trigger level passes STAGES flip-flops clocked at 80 MHz;
// the rising edge of the synchronized level gives a one-cycle `pulse`. The
// input must stay high for at least two 80 MHz cycles to be seen reliably.
//
// Timing: `pulse` rises STAGES + 1 cycles after the input rises at a clock
// edge (STAGES to resolve metastability, one for the edge detector).
// From the description: the external trigger and the event trigger are each
// synchronized to the 80 MHz clock. The two-flop structure and edge
// detection are this design's own.
module pd_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic pulse
);

  logic [STAGES-1:0] sh;
  logic              last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '0;
      last  <= 1'b0;
      pulse <= 1'b0;
    end else begin
      sh    <= (sh << 1) | STAGES'(async_in);
      last  <= sh[STAGES-1];
      pulse <= sh[STAGES-1] & ~last;
    end
  end

endmodule
