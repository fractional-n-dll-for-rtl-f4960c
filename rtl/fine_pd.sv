`timescale 1ns/1ps
// Fine-loop phase-frequency detector with start-up flip-flop.
//
// A conventional PFD sets UP on the reference edge and DN on the feedback
// (DLL_CLK) edge and clears both once both are set, so the width
// difference of the two pulses is the phase error. In a DLL the feedback
// edge must be compared with the *second* reference edge, so an extra
// flip-flop (RDY) is put in front of the UP flip-flop: while start is low
// the whole detector is held cleared; after start rises, the first
// reference edge only sets RDY and UP can be set from the second reference
// edge on. The start-up flip-flop and the shared clear follow the
// schematic; the clear is written as "start low, or UP and DN both set".
//
// The clear acts RST_DELAY_NS after UP and DN are both set, so even in
// phase both outputs give pulses of that width, which keeps the charge
// pump out of its dead zone. The design sizes this pulse at about T_REF/5
// (1 ns at 200 MHz, the default). The delay is a timing property of the
// circuit: synthesis drops it and leaves the zero-delay clear.
module fine_pd #(
  parameter real RST_DELAY_NS = 1.0   // minimum UP/DN pulse, ~T_REF/5
) (
  input  logic ref_clk,  // delay-line input (the loop's reference)
  input  logic dll_clk,  // averaged feedback clock from the fine mux
  input  logic start,    // active-high enable; low clears everything
  output logic up,       // reference edge came first: shorten the delay
  output logic dn,       // feedback edge came first: lengthen the delay
  output logic rdy       // first reference edge seen
);

  logic both, both_dly, clr_n;

  assign both = up & dn;
  assign #(RST_DELAY_NS) both_dly = both;
  assign clr_n = start & ~both_dly;

  always_ff @(posedge ref_clk or negedge start) begin
    if (!start) rdy <= 1'b0;
    else        rdy <= 1'b1;
  end

  always_ff @(posedge ref_clk or negedge clr_n) begin
    if (!clr_n) up <= 1'b0;
    else        up <= rdy;
  end

  always_ff @(posedge dll_clk or negedge clr_n) begin
    if (!clr_n) dn <= 1'b0;
    else        dn <= 1'b1;
  end

endmodule
