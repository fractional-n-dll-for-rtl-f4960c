`timescale 1ns/1ps
// Two-bit quantizer of the delta-sigma modulator.
//
// The input v is compared with three thresholds, -N/2, 0 and +N/2, where N
// is the programmable number of fine steps per cell delay (given here as
// n_half = N/2). The output level q is 0 below -N/2, 1 from -N/2 to below 0,
// 2 from 0 to below +N/2 and 3 from +N/2 up, as in the quantizer
// characteristic of the design. The value fed back into the modulator loop
// for level q is (2q - 3) * N/2, i.e. -3N/2, -N/2, +N/2, +3N/2: one level
// step equals N input units, so the mean level is 1.5 + x/N for a constant
// input x, which is the fractional ratio relation of the design
// (X = P_B + 0.5 + delay_step/10 with N = 10). The feedback values are this
// implementation's reading of "programmable quantized feedback values".
// Purely combinational.
module dsm_quantizer #(
  parameter int unsigned W      = 12,  // width of the loop words
  parameter int unsigned HALF_W = 4    // width of n_half
) (
  input  logic signed [W-1:0] v,       // accumulator output plus dither
  input  logic [HALF_W-1:0]   n_half,  // N/2
  output logic [1:0]          q,       // quantized level 0..3
  output logic signed [W-1:0] fb       // value fed back for level q
);

  logic signed [W-1:0] h;

  always_comb begin
    h = W'(signed'({1'b0, n_half}));
    if (v < -h)      q = 2'd0;
    else if (v < 0)  q = 2'd1;
    else if (v < h)  q = 2'd2;
    else             q = 2'd3;
    unique case (q)
      2'd0:    fb = -3 * h;
      2'd1:    fb = -h;
      2'd2:    fb = h;
      default: fb = 3 * h;
    endcase
  end

endmodule
