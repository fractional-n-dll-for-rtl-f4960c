`timescale 1ns/1ps
// Behavioural model (not synthesizable) of the voltage-controlled delay
// line.
//
// CELLS equal delay cells in series; p[0] is the line input and p[k] the
// output of cell k. Every cell delays both edges by
//     T_D = T_REF/10 - (T_REF/20) * vc,     vc clamped to -1..+1,
// the design's normalised control law: T_REF/10 at vc = 0, longer for
// negative vc. Edges are carried with transport delay, so pulses shorter
// than T_D survive, and a change of vc acts on the edges that enter a cell
// after it. The real line is built from differential cells with symmetric
// loads and a replica-biased tail current; this model keeps only the delay
// law. The main line has 13 cells; the coarse phase detector uses 3-cell
// copies driven by the same vc.
module vcdl #(
  parameter int unsigned CELLS    = 13,
  parameter real         T_REF_NS = 5.0   // reference period in ns
) (
  input  logic           clk_in,
  input  real            vc,     // normalised control voltage
  output logic [CELLS:0] p       // taps P0..P(CELLS)
);

  real td;

  always_comb begin
    if (vc > 1.0)       td = T_REF_NS / 20.0;
    else if (vc < -1.0) td = 3.0 * T_REF_NS / 20.0;
    else                td = T_REF_NS / 10.0 - T_REF_NS / 20.0 * vc;
  end

  assign p[0] = clk_in;

  // td is clamped to T/20 .. 3T/20, so the cell delay is never zero even
  // though lint cannot prove it from the real-valued expression
  for (genvar k = 1; k <= CELLS; k++) begin : g_cell
    initial p[k] = 1'b0;
    always @(p[k-1]) p[k] <= #(td) p[k-1];
  end

endmodule
