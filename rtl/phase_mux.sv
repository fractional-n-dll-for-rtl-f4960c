`timescale 1ns/1ps
// One-hot clock phase multiplexer.
//
// Passes the delay-line phase whose select bit is set. The design uses three
// of them: the 10:1 coarse multiplexer driven by the coarse FSM's one-hot
// mux[9:0] (taps P4..P13), the 5:1 fine multiplexer driven by the
// modulator's one-hot mod_out[4:0] (taps P7..P11) and the 2:1 selector that
// clocks the modulator from P6 or P7. The document builds the multiplexer
// from differential delay cells used as switches; here it is an AND-OR of
// the select and phase bits, so it is purely combinational with no clock. An
// all-zero select gives a constant low output.
module phase_mux #(
  parameter int unsigned N = 10
) (
  input  logic [N-1:0] sel,     // one-hot phase select
  input  logic [N-1:0] phases,  // phases[i] is passed when sel[i] is set
  output logic         clk_out
);

  always_comb clk_out = |(sel & phases);

endmodule
