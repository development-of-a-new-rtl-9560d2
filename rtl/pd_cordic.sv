// pd_cordic: pipelined CORDIC in vectoring mode, (I, Q) -> (phase, magnitude).
//
// A first stage folds the left half-plane onto the right one (negate I and Q,
// add 180 degrees). Each of the ITER following stages rotates the vector by
// +/-atan(2^-k) towards the I axis with shifts and adds, accumulating the
// rotation angle; the angle is kept as an ANG_W-bit binary angle
// (2^ANG_W counts = 360 degrees). A last stage rounds the angle to PH_W bits
// and multiplies the residual I by 1/K = 0.607253 (39797 / 2^16) to remove
// the CORDIC gain, giving the magnitude in input counts.
//
// Interface: one (I, Q) pair may enter every cycle; `out_valid` follows
// `in_valid` by LATENCY = ITER + 2 cycles. Phase range is [-180, 180) degrees.
// The description only asks for phase and magnitude; CORDIC, its widths and
// the iteration count are this design's own.
module pd_cordic
  import phdet_pkg::*;
#(
  parameter int unsigned ITER  = 16,
  parameter int unsigned ANG_W = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  iq_t    in_i,
  input  iq_t    in_q,
  output logic   out_valid,
  output phase_t phase,
  output mag_t   mag
);

  localparam int unsigned G   = 4;          // fraction bits against rounding loss
  localparam int unsigned X_W = IQ_W + 2 + G; // folding and CORDIC gain growth
  localparam int unsigned GAIN_INV = 39797; // round(0.6072529350 * 2^16)

  // atan(2^-k) in units of 360 / 2^20 degrees, k = 0..17
  function automatic logic [ANG_W-1:0] atan_tab(input int unsigned k);
    logic [19:0] a;
    case (k)
      0: a = 20'd131072;  1: a = 20'd77376;  2: a = 20'd40884;  3: a = 20'd20753;
      4: a = 20'd10417;   5: a = 20'd5213;   6: a = 20'd2607;   7: a = 20'd1304;
      8: a = 20'd652;     9: a = 20'd326;   10: a = 20'd163;   11: a = 20'd81;
     12: a = 20'd41;     13: a = 20'd20;    14: a = 20'd10;    15: a = 20'd5;
     16: a = 20'd3;      17: a = 20'd1;
      default: a = 20'd0;
    endcase
    if (ANG_W >= 20) return ANG_W'(a) << (ANG_W - 20);
    else             return ANG_W'(a >> (20 - ANG_W));
  endfunction

  logic signed [X_W-1:0]   x [ITER+1];
  logic signed [X_W-1:0]   y [ITER+1];
  logic        [ANG_W-1:0] z [ITER+1];
  logic        [ITER:0]    v;

  // stage 0: fold into the right half-plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      if (in_i < 0) begin
        x[0] <= -(X_W'(in_i) <<< G);
        y[0] <= -(X_W'(in_q) <<< G);
        z[0] <= ANG_W'(1) << (ANG_W - 1);
      end else begin
        x[0] <= X_W'(in_i) <<< G;
        y[0] <= X_W'(in_q) <<< G;
        z[0] <= '0;
      end
    end
  end

  // stages 1..ITER: micro-rotations
  for (genvar k = 0; k < ITER; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[k+1] <= '0; y[k+1] <= '0; z[k+1] <= '0; v[k+1] <= 1'b0;
      end else begin
        v[k+1] <= v[k];
        if (y[k] >= 0) begin
          x[k+1] <= x[k] + (y[k] >>> k);
          y[k+1] <= y[k] - (x[k] >>> k);
          z[k+1] <= z[k] + atan_tab(k);
        end else begin
          x[k+1] <= x[k] - (y[k] >>> k);
          y[k+1] <= y[k] + (x[k] >>> k);
          z[k+1] <= z[k] - atan_tab(k);
        end
      end
    end
  end

  // output stage: round the angle, remove the gain
  logic [X_W+16-1:0] mag_prod;
  logic [ANG_W-1:0]  z_rnd;
  assign mag_prod = X_W'(x[ITER]) * (X_W+16)'(GAIN_INV) + (X_W+16)'(1 << (15 + G));
  assign z_rnd    = z[ITER] + (ANG_W > PH_W ? ANG_W'(1) << (ANG_W - PH_W - 1) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phase     <= '0;
      mag       <= '0;
    end else begin
      out_valid <= v[ITER];
      phase     <= phase_t'(z_rnd >> (ANG_W - PH_W));
      mag       <= mag_t'(mag_prod >> (16 + G));
    end
  end

endmodule
