// pd_pll_model: behavioural model (not synthesizable) of the FPGA PLL that
// multiplies the 20 MHz reference by four. Every rising reference edge
// starts four 80 MHz periods aligned to it; the 20 MHz output is the
// reference delayed by 30 degrees (4.167 ns at 20 MHz), square, 50 % duty.
// `locked` rises after LOCK_EDGES reference edges; before that both outputs
// stay low. The reference must have a 50 ns period.
module pd_pll_model #(
  parameter int LOCK_EDGES = 4
) (
  input  logic ref_in,
  output logic clk80,
  output logic clk20_m30,
  output logic locked
);

  int edges = 0;

  initial begin
    clk80 = 1'b0;
    clk20_m30 = 1'b0;
    locked = 1'b0;
  end

  always @(posedge ref_in) begin
    edges++;
    if (edges > LOCK_EDGES) begin
      locked = 1'b1;
      fork
        begin
          repeat (4) begin
            clk80 = 1'b1;
            #6.25ns;
            clk80 = 1'b0;
            #6.25ns;
          end
        end
        begin
          #4.1667ns;
          clk20_m30 = 1'b1;
          #25ns;
          clk20_m30 = 1'b0;
        end
      join_none
    end
  end

endmodule
