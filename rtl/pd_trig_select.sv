// pd_trig_select: choice of the acquisition trigger.
//
// The synchronized external trigger and the synchronized event trigger each
// pass an enable bit and are then ORed. The control system normally enables
// one of the two; enabling both accepts either. The registered output is the
// trigger of the recorder sample control, one cycle after the inputs.
// From the description: the text says one or the other trigger is selected,
// the block diagram shows an OR of the two; the enable bits in front of an
// OR give both readings.
module pd_trig_select (
  input  logic clk,
  input  logic rst_n,
  input  logic ext_pulse,
  input  logic evt_pulse,
  input  logic en_ext,
  input  logic en_evt,
  output logic trig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig <= 1'b0;
    else        trig <= (ext_pulse & en_ext) | (evt_pulse & en_evt);
  end

endmodule
