// pd_event_rx: event receiver for the accelerator event link.
//
// The event link's clock/data recovery delivers event codes in the event
// clock domain. This receiver compares every received code with the code
// the control system selected and, on a match, raises `evt_trig` for
// STRETCH event clock cycles, long enough for the 80 MHz synchronizer to
// see it.
//
// Interface: `evt_code` is sampled when `evt_valid` is high; code 0 is the
// link's null code and never matches. `match_code` comes from the 80 MHz
// register block and is treated as static (it is only changed while no
// events of interest are expected).
// The description only names this receiver; the parallel 8-bit code
// interface, the null code and the pulse stretching are this design's own.
module pd_event_rx #(
  parameter int unsigned CODE_W  = 8,
  parameter int unsigned STRETCH = 4
) (
  input  logic              evt_clk,
  input  logic              evt_rst_n,
  input  logic [CODE_W-1:0] evt_code,
  input  logic              evt_valid,
  input  logic [CODE_W-1:0] match_code,
  output logic              evt_trig
);

  localparam int unsigned SW = $clog2(STRETCH + 1);

  logic [SW-1:0] hold;
  logic          hit;

  assign hit = evt_valid && (evt_code != '0) && (evt_code == match_code);

  always_ff @(posedge evt_clk or negedge evt_rst_n) begin
    if (!evt_rst_n) begin
      hold <= '0;
    end else if (hit) begin
      hold <= SW'(STRETCH);
    end else if (hold != '0) begin
      hold <= hold - 1'b1;
    end
  end

  assign evt_trig = (hold != '0);

endmodule
