`timescale 1ns/1ps
// Coarse-loop phase detector: decides whether the coarse clock edge lies in
// the tenth of a period just before the reference edge.
//
// Three flip-flops are clocked by the coarse clock after three delay cells
// (coarse_d3). They sample the reference clock after one, two and three
// cells (ref_d1, ref_d2, ref_d3), which is the reference level 2T/10, T/10
// and 0 after the coarse edge. The delay cells are copies of the delay-line
// cell and sit outside this module. The decode follows the region table of
// the design (regions A..J, each T/10 wide):
//   updn = 1 when the reference is already high at the coarse edge (coarse
//          clock lags, regions F..J),
//   hold = 1 when the reference is low at the coarse edge but high T/10 and
//          2T/10 later (coarse clock leads by less than T/10, region E).
// Which delayed signal feeds which flip-flop follows the schematic; the
// decode equations are derived from the region table. Outputs are
// registered in the coarse_d3 domain and change one flop delay after its
// rising edge; rst_n (asynchronous, active low) clears them.
module coarse_pd (
  input  logic coarse_d3,  // coarse clock delayed by three cells
  input  logic rst_n,
  input  logic ref_d1,     // reference clock delayed by one cell
  input  logic ref_d2,     // reference clock delayed by two cells
  input  logic ref_d3,     // reference clock delayed by three cells
  output logic updn,       // 1: coarse clock lags the reference
  output logic hold        // 1: coarse clock leads by less than T/10
);

  logic q1, q2, q3;

  always_ff @(posedge coarse_d3 or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
      q3 <= 1'b0;
    end else begin
      q1 <= ref_d1;
      q2 <= ref_d2;
      q3 <= ref_d3;
    end
  end

  always_comb begin
    updn = q3;
    hold = q1 & q2 & ~q3;
  end

endmodule
