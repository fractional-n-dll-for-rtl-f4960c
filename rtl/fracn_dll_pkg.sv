`timescale 1ns/1ps
// Shared constants of the fractional-N DLL.
//
// The delay line has 13 equal cells (taps P0..P13). The coarse loop picks its
// output among P4..P13 (ten taps, one reference period), the fine loop feeds
// back one of P7..P11 chosen by the delta-sigma modulator, and the modulator
// itself is clocked by P6 or P7 depending on the switching group. These tap
// numbers and the ten-step fine resolution (N = 10) follow the design
// description; the word widths below are this implementation's choice.
package fracn_dll_pkg;

  localparam int unsigned VCDL_CELLS   = 13;  // delay cells P1..P13
  localparam int unsigned COARSE_TAPS  = 10;  // coarse selection P4..P13
  localparam int unsigned COARSE_BASE  = 4;   // tap number of mux[0]
  localparam int unsigned FINE_TAPS    = 5;   // fine feedback P7..P11
  localparam int unsigned FINE_BASE    = 7;   // tap number of mod_out[0]
  localparam int unsigned N_STEPS      = 10;  // fine steps per cell delay
  localparam int unsigned STEP_W       = 5;   // width of delay_step (signed)
  localparam int unsigned HALF_W       = 4;   // width of the N/2 setting

  typedef logic signed [STEP_W-1:0] step_t;

  // Position of the reset tap P10 in the fine multiplexer.
  localparam int unsigned FINE_RESET_IDX = 10 - FINE_BASE;

endpackage
