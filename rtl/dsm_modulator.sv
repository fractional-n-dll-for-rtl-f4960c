`timescale 1ns/1ps
// Second-order digital delta-sigma modulator that picks the fine-loop
// feedback phase.
//
// Structure (as in the design's discrete model and modulator schematic):
//   ADD1 + ACCUM1:  a1[n]   = a1[n-1] + x[n] - y[n]        (z/(z-1))
//   ADD2 + ACCUM2:  a2[n+1] = a2[n] + a1[n] - y[n]         (1/(z-1))
//   QUANTIZER:      y[n]    = Q(a2[n] + d[n])
// where y is the feedback value of the 2-bit quantizer and d the dither.
// This gives Y = z^-1 X + (1 - z^-1)^2 (E + D): the input passes with one
// clock of delay, quantization error and dither are second-order high-pass
// shaped, so the average of the level follows the input.
//
// The input mod_in is the fine FSM's delay_step (-N/2..+N/2). The level
// q (0..3) plus adr_ctrl (0 or 1) is the index of the selected tap among
// P7..P11, and mod_out is that index one-hot, registered on the modulator
// clock (a tap of the delay line chosen by trgr_ctrl). Reset (asynchronous,
// active low) points mod_out at P10 (index 3), the tap that makes the delay
// line a plain one-period DLL; the first output after reset appears on the
// first clock edge.
//
// Dither is the LSB of a 24-bit PN register times DITHER_GAIN quantizer
// steps (one step = N input units); the design calls for a gain of one
// quantization level, which is the default. The word width W is this
// implementation's choice and covers the loop states with margin.
module dsm_modulator
  import fracn_dll_pkg::*;
#(
  parameter int unsigned W           = 12,
  parameter int unsigned DITHER_GAIN = 1
) (
  input  logic                 clk,      // selected delay-line tap (P6/P7)
  input  logic                 rst_n,
  input  step_t                mod_in,   // delay_step from the fine FSM
  input  logic                 adr_ctrl, // switching group: 0 P7..P10, 1 P8..P11
  input  logic [HALF_W-1:0]    n_half,   // N/2
  output logic [FINE_TAPS-1:0] mod_out,  // one-hot select of P7..P11
  output logic [1:0]           level     // quantizer level of the last clock
);

  logic signed [W-1:0] a1_q, a2_q;
  logic signed [W-1:0] a1_d, a2_d, v, fb, x, dither;
  logic [1:0]          q;
  logic                pn;
  logic [23:0]         pn_state;  // register contents, observation only

  pn_gen u_pn (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (1'b1),
    .pn   (pn),
    .state(pn_state)
  );

  dsm_quantizer #(.W(W), .HALF_W(HALF_W)) u_quant (
    .v     (v),
    .n_half(n_half),
    .q     (q),
    .fb    (fb)
  );

  always_comb begin
    x      = W'(mod_in);
    dither = pn ? W'(DITHER_GAIN * 2 * n_half) : '0;
    v      = a2_q + dither;
    a1_d   = a1_q + x - fb;   // ADD1 feeding ACCUM1
    a2_d   = a2_q + a1_d - fb; // ADD2 feeding ACCUM2
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1_q    <= '0;
      a2_q    <= '0;
      level   <= 2'd2;
      mod_out <= FINE_TAPS'(1) << FINE_RESET_IDX;
    end else begin
      a1_q    <= a1_d;
      a2_q    <= a2_d;
      level   <= q;
      mod_out <= FINE_TAPS'(1) << (3'(q) + 3'(adr_ctrl));
    end
  end

endmodule
